// tb_dwt_codec_top: end-to-end test of the analysis -> synthesis chain on
// unsigned pixels, with every parameter at its default.
//
// Stimulus: NS pixels made of a slow sinusoid (period 64 samples, the
// third-stage low-pass band), a constant full-scale run and random pixels.
// Checks, per sample period:
//  - coef_out against the analysis equations applied to (pixel - 128)
//  - coef_band against the phase
//  - pixel_out against the synthesis equations applied to that coefficient
//    stream (output i'(c-12) in period c), plus the MSB conversion
// Mechanism counters (each must occur at least once): every sub-band on the
// output, the R7 -> R5 feedback phases of the analysis register chain, the
// R4 -> R1 / R5 -> R4 feedback of the synthesis output registers, clamping
// in the analysis and in the synthesis, -128 operands, negative products.
// It also reports how closely pixel_out follows the input for the slow
// sinusoid at the best alignment (informational).
//
// Image part, at the default 640 x 480 size: a test image (smooth shading,
// a random stripe and a saturated checkerboard block) is written through
// the host port, transformed by the 2-D analysis and read back, then
// transformed back by the 2-D synthesis and read back; both results are
// compared byte by byte with the row-then-column reference. Counted
// mechanisms: per-line core restarts, write-backs into each of the four
// sub-band areas of a row, clamps in the image reference, and the stream
// path working again after the image jobs.
module tb_dwt_codec_top;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  localparam int NS = 2048;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic [7:0] pixel_in;
  sample_t    coef_out;
  band_t      coef_band;
  phase_t     phase;
  logic       smp_end;
  logic [7:0] pixel_out;
  logic       ovf_a, ovf_s;
  logic       img_start = 1'b0, img_inverse = 1'b0, img_busy, img_done;
  logic       img_we = 1'b0;
  logic [7:0] img_wdata = '0, img_rdata;

  localparam int COLS = 640, ROWS = 480, NPIX = COLS * ROWS;
  localparam int IMAW = $clog2(NPIX);
  localparam int DLY  = 33;

  logic [IMAW-1:0] img_addr = '0;

  int checks = 0, failures = 0;

  dwt_codec_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #300000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int px [], x [], ya [], ys [];
  int nca, ncs;
  int seen_band [4];
  int n_fb_a, n_fb_s, n_ovf_a, n_ovf_s, n_m128, n_negprod;

  // mechanism monitors on internal selects and operands
  always @(posedge clk) if (rst_n) begin
    if (dut.u_ana.smp_end && (dut.u_ana.sel.s4k1 || dut.u_ana.sel.s8k)) n_fb_a++;
    if (dut.u_syn.smp_end && dut.u_syn.sel.s8k5) n_fb_s++;
    if (dut.u_ana.opnd == -128 || dut.u_syn.opnd == -128) n_m128++;
    if (dut.u_ana.u_pe_g.prod[31]) n_negprod++;
  end

  // ---------------- image part ----------------
  int n_restart, n_done;
  int area_wr [4];
  int orig [], img [], exp_img [];

  always @(negedge dut.core_rst_n) if (rst_n && img_busy) n_restart++;
  always @(posedge clk) if (rst_n && img_done) n_done++;
  always @(posedge clk)
    if (rst_n && img_busy && dut.u_img.m_we && !dut.u_img.inv && !dut.u_img.col_pass) begin
      int p;
      p = int'(dut.u_img.m_addr) % COLS;
      if (p < COLS / 8) area_wr[0]++;
      else if (p < COLS / 4) area_wr[1]++;
      else if (p < COLS / 2) area_wr[2]++;
      else area_wr[3]++;
    end

  task automatic img_read(ref int im []);
    im = new[NPIX];
    @(negedge clk);
    img_addr = '0;
    for (int a = 0; a < NPIX; a++) begin
      @(negedge clk);
      im[a] = int'(img_rdata);
      img_addr = IMAW'(a + 1);
    end
  endtask

  task automatic img_compare(string what, const ref int got [], const ref int ex []);
    int nbad;
    nbad = 0;
    for (int a = 0; a < NPIX; a++) begin
      checks++;
      if (got[a] != ex[a]) begin
        failures++; nbad++;
        if (nbad < 10) $display("%s: pixel (%0d,%0d) = %0d, expected %0d",
                                what, a / COLS, a % COLS, got[a], ex[a]);
      end
    end
  endtask

  task automatic img_run(bit inv);
    int t0, n0, nd0;
    n0 = n_restart; nd0 = n_done;
    @(negedge clk);
    img_start = 1'b1; img_inverse = inv;
    @(negedge clk);
    img_start = 1'b0; img_inverse = 1'b0;
    t0 = 0;
    while (img_busy) begin @(negedge clk); t0++; end
    @(negedge clk);
    checks++;
    if (n_restart - n0 != ROWS + COLS) begin
      failures++; $display("%0d line restarts, expected %0d", n_restart - n0, ROWS + COLS);
    end
    checks++;
    if (n_done - nd0 != 1) begin failures++; $display("%0d done pulses", n_done - nd0); end
    if (inv) $display("image synthesis: %0d clocks", t0);
    else     $display("image analysis: %0d clocks", t0);
  endtask

  task automatic image_part();
    int nc;
    orig = new[NPIX];
    for (int r = 0; r < ROWS; r++)
      for (int q = 0; q < COLS; q++) begin
        int v;
        if (r >= 200 && r < 216)
          v = $urandom_range(0, 255);                                  // random stripe
        else if (r >= 400 && q >= 560)
          v = (((r / 8) + (q / 8)) % 2 != 0) ? 255 : 0;                // checkerboard
        else
          v = 128 + int'($floor(100.0 * $sin(6.283185307 * q / 160.0)
                                     * $cos(6.283185307 * r / 120.0)));  // shading
        orig[r * COLS + q] = v;
      end

    // load through the host port
    for (int a = 0; a < NPIX; a++) begin
      @(negedge clk);
      img_we = 1'b1; img_addr = IMAW'(a); img_wdata = 8'(orig[a]);
    end
    @(negedge clk);
    img_we = 1'b0;

    img_run(1'b0);
    exp_img = orig;
    img2d(exp_img, COLS, ROWS, 1'b0, DLY, nc);
    img_read(img);
    img_compare("image analysis", img, exp_img);
    $display("image analysis clamps (reference): %0d", nc);
    checks++; if (nc == 0) begin failures++; $display("no clamp in the image analysis"); end
    for (int b = 0; b < 4; b++) begin
      checks++;
      if (area_wr[b] == 0) begin failures++; $display("no write into sub-band area %0d", b); end
    end
    $display("row-pass writes per area v/u/r/o: %0d/%0d/%0d/%0d",
             area_wr[0], area_wr[1], area_wr[2], area_wr[3]);

    img_run(1'b1);
    img2d(exp_img, COLS, ROWS, 1'b1, DLY, nc);
    img_read(img);
    img_compare("image synthesis", img, exp_img);

    begin
      real e, sig;
      e = 0.0; sig = 0.0;
      for (int r = 16; r < 184; r++)
        for (int q = 16; q < COLS - 16; q++) begin
          e   += (img[r * COLS + q] - orig[r * COLS + q]) ** 2;
          sig += 255.0 * 255.0;
        end
      $display("shaded area PSNR after 2-D analysis + synthesis: %0.1f dB",
               10.0 * $log10(sig / (e + 1.0e-9)));
    end

    // streaming path still works after the image jobs
    @(negedge clk);
    rst_n = 1'b0;
    pixel_in = 8'd200;
    @(negedge clk);
    rst_n = 1'b1;
    repeat (4 * 64) @(negedge clk);
    checks++;
    if (phase != phase_t'(0) && coef_band != band_of_phase(phase)) failures++;
    checks++;
    if (!(pixel_out > 8'd180 && pixel_out < 8'd220)) begin
      failures++; $display("stream after image jobs: pixel_out %0d for constant 200", pixel_out);
    end
  endtask

  initial begin
    px = new[NS];
    for (int n = 0; n < NS; n++) begin
      if (n < 768)       px[n] = 128 + int'($floor(120.0 * $sin(6.283185307 * n / 64.0)));
      else if (n < 1024) px[n] = 255;
      else if (n < 1100) px[n] = 0;
      else               px[n] = $urandom_range(0, 255);
    end
    x = new[NS];
    foreach (px[n]) x[n] = px[n] - 128;
    ana_model(x, ya, nca);
    syn_model(ya, ys, ncs);

    pixel_in = 8'(px[0]);
    @(negedge clk); @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < NS; c++) begin
      @(negedge clk); @(negedge clk);
      checks++;
      if (int'(coef_out) != ya[c]) begin
        failures++;
        if (failures < 20) $display("period %0d: coef %0d expected %0d", c, coef_out, ya[c]);
      end
      checks++;
      if (coef_band != band_of_phase(phase_t'(c % 8))) failures++;
      checks++;
      if (int'(pixel_out) != ys[c] + 128) begin
        failures++;
        if (failures < 20) $display("period %0d: pixel_out %0d expected %0d", c, pixel_out, ys[c] + 128);
      end
      seen_band[coef_band]++;
      if (ovf_a) n_ovf_a++;
      if (ovf_s) n_ovf_s++;
      @(negedge clk); @(negedge clk);
      if (c + 1 < NS) pixel_in = 8'(px[c + 1]);
    end
    for (int b = 0; b < 4; b++) begin
      checks++;
      if (seen_band[b] == 0) begin failures++; $display("band %0d never on the output", b); end
    end
    checks++; if (n_fb_a == 0)    begin failures++; $display("analysis feedback never used"); end
    checks++; if (n_fb_s == 0)    begin failures++; $display("synthesis feedback never used"); end
    checks++; if (n_ovf_a == 0)   begin failures++; $display("analysis clamp never seen"); end
    checks++; if (n_ovf_s == 0)   begin failures++; $display("synthesis clamp never seen"); end
    checks++; if (n_m128 == 0)    begin failures++; $display("-128 operand never seen"); end
    checks++; if (n_negprod == 0) begin failures++; $display("negative product never seen"); end
    $display("mechanisms: bands %0d/%0d/%0d/%0d, fb_a %0d, fb_s %0d, ovf_a %0d, ovf_s %0d, m128 %0d, negprod %0d",
             seen_band[0], seen_band[1], seen_band[2], seen_band[3], n_fb_a, n_fb_s,
             n_ovf_a, n_ovf_s, n_m128, n_negprod);
    // reconstruction quality on the sinusoid (informational)
    begin
      real best_e, e, sig;
      int best_d;
      best_e = 1.0e30; best_d = 0;
      for (int d = 0; d < 40; d++) begin
        e = 0.0;
        for (int c = 200; c < 700; c++) e += (ys[c] - x[c - d]) * (ys[c] - x[c - d]);
        if (e < best_e) begin best_e = e; best_d = d; end
      end
      sig = 0.0;
      for (int c = 200; c < 700; c++) sig += x[c - best_d] * x[c - best_d];
      $display("sinusoid reconstruction: best delay %0d samples, SNR %0.1f dB",
               best_d, 10.0 * $log10(sig / (best_e + 1.0e-9)));
    end
    image_part();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
