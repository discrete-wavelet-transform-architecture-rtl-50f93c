// tb_radix2_mult: self-checking test of the 25 x 8-bit radix-2 multiplier.
// Each product is checked in the form the accumulator consumes it: the
// 32-bit word plus its sign bit (the adder's carry in) must equal x*y, the
// sign bit must be set only for negative non-zero products, and the word
// must be the plain magnitude for non-negative ones. Operands are random
// plus corners: y = -128, -1, 0, 127 and |x| = 0, 1, 2^24-1, and the filter
// coefficients themselves.
module tb_radix2_mult;
  import dwt_pkg::*;

  logic [24:0] x;
  logic [7:0]  y;
  logic [31:0] prod;
  int checks = 0, failures = 0;

  radix2_mult dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    longint xv, yv, pv, got;
    #1;
    xv  = longint'($signed(x));
    yv  = longint'($signed(y));
    pv  = xv * yv;
    got = longint'($signed(prod)) + longint'(prod[31]);
    checks++;
    if (got != pv || prod[31] != (pv < 0) || (pv >= 0 && longint'(prod) != pv)) begin
      failures++;
      if (failures < 10) $display("x=%0d y=%0d prod=%h expected %0d", xv, yv, prod, pv);
    end
  endtask

  int ys [6] = '{-128, -127, -1, 0, 1, 127};
  int xs [6] = '{0, 1, -1, 16777215, -16777215, 4194304};

  initial begin
    foreach (xs[i]) foreach (ys[j]) begin
      x = 25'(xs[i]); y = 8'(ys[j]); check();
    end
    for (int k = 0; k < 4; k++) foreach (ys[j]) begin
      x = H_ANA[k]; y = 8'(ys[j]); check();
      x = G_SYN[k]; y = 8'(ys[j]); check();
    end
    for (int n = 0; n < 20000; n++) begin
      x = 25'($urandom);
      if (x == 25'h100_0000) x = 25'h100_0001;   // -2^24 is outside the range
      y = 8'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
