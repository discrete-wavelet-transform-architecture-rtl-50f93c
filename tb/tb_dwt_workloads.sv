// tb_dwt_workloads: the 1-D evaluation runs of the design, each on its own
// analysis -> synthesis pair, driven in parallel with the same signal.
//
// Signal: 512 samples of a full-scale sinusoid whose period is 64 sample
// periods (its energy lies in the third-stage low-pass band).
// Configurations (coefficient parameters of the cores):
//   0  normalization case 1: plain Daubechies taps, input divided by 4
//      (arithmetic shift), output multiplied by 4 for the comparison
//   1  normalization case 2: analysis taps / 2, synthesis taps * 2
//   2  normalization case 3 (the cores' defaults): analysis taps / sqrt2,
//      synthesis taps * sqrt2
//   3  case 3 with 17-bit coefficient words (low 8 bits zero)
//   4  case 3 with 9-bit coefficient words (low 16 bits zero)
// Each coefficient word is round(2^(b-2) * k * tap) * 2^(25-b) for word
// width b and scale k; the constants below are compared with that formula
// at run time. Checks, every sample period and configuration: the analysis
// coefficient and the synthesis output against the reference equations
// with the same coefficients. Every configuration must produce output in
// all four sub-bands. The reconstruction SNR of each configuration (best
// alignment) is printed for information.
module tb_dwt_workloads;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  localparam int NS = 512;
  localparam int NCFG = 5;

  localparam coef_set_t HA [NCFG] = '{
    {25'h1EF6F82, 25'h01CB0BF, 25'h06B12F7, 25'h03DD1BB},
    {25'h1F7B7C1, 25'h00E5860, 25'h035897C, 25'h01EE8DD},
    {25'h1F44985, 25'h0144985, 25'h04BB67B, 25'h02BB67B},
    {25'h1F44A00, 25'h0144A00, 25'h04BB600, 25'h02BB600},
    {25'h1F40000, 25'h0140000, 25'h04C0000, 25'h02C0000}};
  localparam coef_set_t GA [NCFG] = '{
    {25'h1C22E45, 25'h06B12F7, 25'h1E34F41, 25'h1EF6F82},
    {25'h1E11723, 25'h035897C, 25'h1F1A7A0, 25'h1F7B7C1},
    {25'h1D44985, 25'h04BB67B, 25'h1EBB67B, 25'h1F44985},
    {25'h1D44A00, 25'h04BB600, 25'h1EBB600, 25'h1F44A00},
    {25'h1D40000, 25'h04C0000, 25'h1EC0000, 25'h1F40000}};
  localparam coef_set_t SE [NCFG] = '{
    {25'h06B12F7, 25'h1EF6F82, 25'h1E34F41, 25'h1C22E45},
    {25'h0D625EF, 25'h1DEDF04, 25'h1C69E82, 25'h1845C8B},
    {25'h0976CF6, 25'h1E8930A, 25'h1D76CF6, 25'h1A8930A},
    {25'h0976D00, 25'h1E89300, 25'h1D76D00, 25'h1A89300},
    {25'h0970000, 25'h1E90000, 25'h1D70000, 25'h1A90000}};
  localparam coef_set_t SO [NCFG] = '{
    {25'h03DD1BB, 25'h01CB0BF, 25'h1EF6F82, 25'h06B12F7},
    {25'h07BA375, 25'h039617E, 25'h1DEDF04, 25'h0D625EF},
    {25'h0576CF6, 25'h028930A, 25'h1E8930A, 25'h0976CF6},
    {25'h0576D00, 25'h0289300, 25'h1E89300, 25'h0976D00},
    {25'h0570000, 25'h0290000, 25'h1E90000, 25'h0970000}};

  // scale and word width of each configuration
  localparam real KA [NCFG] = '{1.0, 0.5, 0.7071067811865476, 0.7071067811865476, 0.7071067811865476};
  localparam real KS [NCFG] = '{1.0, 2.0, 1.4142135623730951, 1.4142135623730951, 1.4142135623730951};
  localparam int  BITS [NCFG] = '{25, 25, 25, 17, 9};

  logic    clk = 1'b0, rst_n = 1'b0;
  sample_t din [NCFG];
  sample_t a_out [NCFG], s_out [NCFG];
  band_t   band [NCFG];
  phase_t  phase [NCFG], s_phase [NCFG];
  logic    smp_end [NCFG], s_smp_end [NCFG], ovf_a [NCFG], ovf_s [NCFG];

  int checks = 0, failures = 0;

  for (genvar i = 0; i < NCFG; i++) begin : g_cfg
    dwt_analysis #(.HC(HA[i]), .GC(GA[i])) u_ana (
      .clk, .rst_n, .din(din[i]), .dout(a_out[i]), .band(band[i]),
      .phase(phase[i]), .smp_end(smp_end[i]), .ovf(ovf_a[i]));
    dwt_synthesis #(.EVEN_C(SE[i]), .ODD_C(SO[i])) u_syn (
      .clk, .rst_n, .din(a_out[i]), .dout(s_out[i]), .phase(s_phase[i]),
      .smp_end(s_smp_end[i]), .ovf(ovf_s[i]));
  end

  always #5 clk = ~clk;

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // compare one parameter set with the formula
  task automatic check_set(string nm, coef_set_t got, coef4_t ex);
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (got[k] != pat25(ex[k])) begin
        failures++;
        $display("%s tap %0d = %h, formula gives %h", nm, k, got[k], pat25(ex[k]));
      end
    end
  endtask

  int x [], xin [NCFG][];
  int ya [NCFG][], ys [NCFG][];
  int seen [NCFG][4];
  int n_ovf_a [NCFG], n_ovf_s [NCFG];

  initial begin
    int nc;
    coef4_t h, g;
    string cname [NCFG];
    cname = '{"case 1 (input / 4)", "case 2 (taps / 2)", "case 3 (taps / sqrt2)",
              "case 3, 17-bit taps", "case 3, 9-bit taps"};

    for (int i = 0; i < NCFG; i++) begin
      h = h_taps(KA[i], BITS[i]); g = g_taps(KA[i], BITS[i]);
      check_set("HA", HA[i], h); check_set("GA", GA[i], g);
      h = h_taps(KS[i], BITS[i]); g = g_taps(KS[i], BITS[i]);
      check_set("SE", SE[i], '{g[3], g[1], h[3], h[1]});
      check_set("SO", SO[i], '{g[2], g[0], h[2], h[0]});
    end

    x = new[NS];
    foreach (x[n]) x[n] = int'($floor(127.0 * $sin(6.283185307 * n / 64.0) + 0.5));
    for (int i = 0; i < NCFG; i++) begin
      xin[i] = new[NS];
      foreach (x[n]) xin[i][n] = (i == 0) ? (x[n] >>> 2) : x[n];
      ana_model(xin[i], ya[i], nc, KA[i], BITS[i]);
      syn_model(ya[i], ys[i], nc, KS[i], BITS[i]);
    end

    for (int i = 0; i < NCFG; i++) din[i] = sample_t'(xin[i][0]);
    @(negedge clk); @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < NS; c++) begin
      @(negedge clk); @(negedge clk);
      for (int i = 0; i < NCFG; i++) begin
        checks++;
        if (int'(a_out[i]) != ya[i][c]) begin
          failures++;
          if (failures < 20) $display("cfg %0d period %0d: coef %0d expected %0d", i, c, a_out[i], ya[i][c]);
        end
        checks++;
        if (int'(s_out[i]) != ys[i][c]) begin
          failures++;
          if (failures < 20) $display("cfg %0d period %0d: out %0d expected %0d", i, c, s_out[i], ys[i][c]);
        end
        seen[i][band[i]]++;
        if (ovf_a[i]) n_ovf_a[i]++;
        if (ovf_s[i]) n_ovf_s[i]++;
      end
      @(negedge clk); @(negedge clk);
      if (c + 1 < NS) for (int i = 0; i < NCFG; i++) din[i] = sample_t'(xin[i][c + 1]);
    end

    for (int i = 0; i < NCFG; i++) begin
      real best_e, e, sig, scale;
      int best_d;
      for (int b = 0; b < 4; b++) begin
        checks++;
        if (seen[i][b] == 0) begin failures++; $display("cfg %0d: band %0d never seen", i, b); end
      end
      scale = (i == 0) ? 4.0 : 1.0;
      best_e = 1.0e30; best_d = 0;
      for (int d = 0; d < 48; d++) begin
        e = 0.0;
        for (int c = 128; c < NS; c++) e += (scale * ys[i][c] - x[c - d]) ** 2;
        if (e < best_e) begin best_e = e; best_d = d; end
      end
      sig = 0.0;
      for (int c = 128; c < NS; c++) sig += real'(x[c - best_d]) ** 2;
      $display("%-24s delay %0d, SNR %5.1f dB, clamps analysis %0d synthesis %0d",
               cname[i], best_d, 10.0 * $log10(sig / (best_e + 1.0e-9)), n_ovf_a[i], n_ovf_s[i]);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
