// tb_fpe: self-checking test of the Fast Processing Element.
// Runs groups of four MAC cycles (csel 0..3) with random coefficient sets
// and operands, plus groups built to overflow positively and negatively,
// and compares the output register and ovf flag loaded at the end of each
// group with dwt_ref_pkg::fpe4 (sum of products, shift by 23, clamp). Also
// checks that the output holds during the following group, i.e. that it
// changes only on the csel = 3 edge.
module tb_fpe;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  logic      clk = 1'b0, rst_n = 1'b0;
  tap_t      csel;
  coef_set_t coefs;
  sample_t   din, dout;
  logic      ovf;
  int checks = 0, failures = 0;

  fpe dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_clamp = 0;

  initial begin
    coef4_t c;
    int     xv [4];
    int     exp_v;
    bit     exp_f;
    csel = '0; din = '0; coefs = '0;
    @(negedge clk); rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      for (int k = 0; k < 4; k++) begin
        if (n % 10 == 3) begin
          c[k] = 16777215; xv[k] = 127;               // positive overflow
        end else if (n % 10 == 7) begin
          c[k] = -16777215; xv[k] = 127;              // negative overflow
        end else if (n % 2 == 0) begin
          c[k] = pat25(int'($urandom)) ;              // any 25-bit value
          c[k] = int'($signed(25'(c[k])));
          if (c[k] == -16777216) c[k] = -16777215;
          xv[k] = int'($signed(8'($urandom)));
        end else begin
          c[k] = (k == 0) ? q23(0.48) : (k == 1) ? q23(0.84) : (k == 2) ? q23(0.22) : q23(-0.13);
          xv[k] = int'($signed(8'($urandom)));
        end
        coefs[k] = pat25(c[k]);
      end
      exp_v = fpe4(c, xv[0], xv[1], xv[2], xv[3], exp_f);
      for (int k = 0; k < 4; k++) begin
        csel = tap_t'(k);
        din  = sample_t'(xv[k]);
        @(negedge clk);
        if (k < 3 && n > 0) begin
          // previous result must still be held
          checks++;
          if (int'(dout) != exp_hold) begin failures++; $display("output not held"); end
        end
      end
      checks++;
      if (int'(dout) != exp_v || ovf != exp_f) begin
        failures++;
        if (failures < 10) $display("group %0d: dout=%0d ovf=%b expected %0d %b", n, dout, ovf, exp_v, exp_f);
      end
      exp_hold = exp_v;
      if (exp_f) n_clamp++;
    end
    checks++;
    if (n_clamp == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int exp_hold;

endmodule
