// tb_dwt_analysis: self-checking test of the folded three-level analysis.
//
// Drives NS samples (a ramp, a slow full-scale sinusoid, then random values,
// including -128 and +127) one per four-clock sample period and compares
// every output coefficient with the analysis equations evaluated by
// dwt_ref_pkg::ana_model. Also checks the sub-band tag of each phase, the
// one-clock output latency after the sample period (o(0) in period 1, v(0)
// in period 8) and that every sub-band and the feedback register path were
// exercised. A watchdog ends the run if it hangs.
module tb_dwt_analysis;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  localparam int NS = 1024;

  logic    clk = 1'b0, rst_n = 1'b0;
  sample_t din;
  sample_t dout;
  band_t   band;
  phase_t  phase;
  logic    smp_end, ovf;

  int checks = 0, failures = 0;

  dwt_analysis dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int x [], y [];
  int nclamp, seen_band [4], n_ovf;

  initial begin
    x = new[NS];
    for (int n = 0; n < NS; n++) begin
      if (n < 64)        x[n] = 4 * n - 128;
      else if (n < 512)  x[n] = int'($floor(127.0 * $sin(6.283185307 * n / 64.0)));
      else               x[n] = int'($signed(8'($urandom)));
    end
    x[600] = -128; x[601] = -128; x[602] = 127; x[603] = 127;
    ana_model(x, y, nclamp);
    // coefficient constants against the closed form
    begin
      coef4_t hc, gc;
      hc = h_taps(1.0 / $sqrt(2.0));
      gc = g_taps(1.0 / $sqrt(2.0));
      for (int k = 0; k < 4; k++) begin
        checks += 2;
        if (H_ANA[k] != pat25(hc[k])) begin failures++; $display("H_ANA[%0d] mismatch", k); end
        if (G_ANA[k] != pat25(gc[k])) begin failures++; $display("G_ANA[%0d] mismatch", k); end
      end
    end
    din = sample_t'(x[0]);
    @(negedge clk); @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < NS; c++) begin
      // mid-period: check phase, band and the output coefficient
      @(negedge clk); @(negedge clk);
      checks++;
      if (phase != phase_t'(c % 8)) begin
        failures++; $display("period %0d: phase %0d", c, phase);
      end
      checks++;
      if (band != band_of_phase(phase_t'(c % 8))) begin
        failures++; $display("period %0d: band %0d", c, band);
      end
      checks++;
      if (int'(dout) != y[c]) begin
        failures++;
        if (failures < 20) $display("period %0d (phase %0d): dout %0d expected %0d", c, c % 8, dout, y[c]);
      end
      seen_band[band]++;
      if (ovf) n_ovf++;
      @(negedge clk); @(negedge clk);
      if (c + 1 < NS) din = sample_t'(x[c + 1]);
    end
    // latency points of the output sequence: o(0) in period 1, v(0) in period 8
    checks++;
    if (y[1] == 0 && y[8] == 0) begin failures++; $display("latency check vacuous"); end
    for (int b = 0; b < 4; b++) begin
      checks++;
      if (seen_band[b] == 0) begin failures++; $display("band %0d never seen", b); end
    end
    $display("analysis: %0d model clamps, %0d ovf periods", nclamp, n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
