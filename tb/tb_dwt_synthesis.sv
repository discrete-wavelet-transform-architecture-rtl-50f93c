// tb_dwt_synthesis: self-checking test of the folded three-level synthesis.
//
// Feeds an interleaved coefficient stream (random values, then a stretch of
// large values that drive the de-normalized filters into clamping) one per
// four-clock sample period and compares each output with the synthesis
// equations evaluated by dwt_ref_pkg::syn_model, i.e. output i'(c-12) in
// period c. Also checks the coefficient constants against the closed form,
// that the phase counter follows the period count and that clamping (ovf)
// occurred. A watchdog ends the run if it hangs.
module tb_dwt_synthesis;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  localparam int NS = 1024;

  logic    clk = 1'b0, rst_n = 1'b0;
  sample_t din;
  sample_t dout;
  phase_t  phase;
  logic    smp_end, ovf;

  int checks = 0, failures = 0;

  dwt_synthesis dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int x [], y [];
  int nclamp, n_ovf;

  initial begin
    x = new[NS];
    for (int n = 0; n < NS; n++) begin
      if (n < 700) x[n] = int'($signed(8'($urandom))) / ((n % 8 == 0) ? 1 : 4);
      else         x[n] = ($urandom_range(0, 1) != 0) ? 127 : -128;
    end
    syn_model(x, y, nclamp);
    begin
      coef4_t hc, gc;
      hc = h_taps($sqrt(2.0));
      gc = g_taps($sqrt(2.0));
      for (int k = 0; k < 4; k++) begin
        checks += 2;
        if (H_SYN[k] != pat25(hc[k])) begin failures++; $display("H_SYN[%0d] mismatch", k); end
        if (G_SYN[k] != pat25(gc[k])) begin failures++; $display("G_SYN[%0d] mismatch", k); end
      end
    end
    din = sample_t'(x[0]);
    @(negedge clk); @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < NS; c++) begin
      @(negedge clk); @(negedge clk);
      checks++;
      if (phase != phase_t'(c % 8)) begin
        failures++; $display("period %0d: phase %0d", c, phase);
      end
      checks++;
      if (int'(dout) != y[c]) begin
        failures++;
        if (failures < 20) $display("period %0d (phase %0d): dout %0d expected %0d", c, c % 8, dout, y[c]);
      end
      if (ovf) n_ovf++;
      @(negedge clk); @(negedge clk);
      if (c + 1 < NS) din = sample_t'(x[c + 1]);
    end
    checks++;
    if (n_ovf == 0 || nclamp == 0) begin failures++; $display("no clamping exercised"); end
    $display("synthesis: %0d model clamps, %0d ovf periods", nclamp, n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
