// tb_dwt2d_image: tests the image memory / row-column sequencer together
// with the real analysis and synthesis cores, on a small non-square image
// (COLS = 40, ROWS = 24, so rows are longer than columns).
//
// Sequence: host port write/read-back of a test image (smooth gradient,
// random area, saturated blocks); 2-D analysis, whose memory contents are
// compared byte by byte with the reference (rows then columns, sub-band
// order v|u|r|o in every line); 2-D synthesis of that result, compared the
// same way. A start pulse while busy must be ignored. Checks also cover the
// busy/done handshake, the number of per-line core restarts (ROWS + COLS
// per run) and write-backs into every sub-band area. The reconstruction
// PSNR against the original image is printed for information.
module tb_dwt2d_image;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  localparam int COLS = 40, ROWS = 24, NPIX = COLS * ROWS;
  localparam int MAW  = $clog2(NPIX);
  localparam int DLY  = 33;

  logic           clk = 1'b0, rst_n = 1'b0;
  logic           start = 1'b0, inverse = 1'b0, busy, done;
  logic           h_we = 1'b0;
  logic [MAW-1:0] h_addr = '0;
  logic [7:0]     h_wdata = '0, h_rdata;
  logic           core_rst_n;
  sample_t        a_din, a_dout, s_din, s_dout;
  logic           smp_end, s_smp_end, ovf_a, ovf_s;
  band_t          band;
  phase_t         phase, s_phase;

  int checks = 0, failures = 0;

  dwt2d_image #(.COLS(COLS), .ROWS(ROWS)) dut (.*);

  dwt_analysis u_ana (.clk, .rst_n(core_rst_n), .din(a_din), .dout(a_dout),
                      .band, .phase, .smp_end, .ovf(ovf_a));
  dwt_synthesis u_syn (.clk, .rst_n(core_rst_n), .din(s_din), .dout(s_dout),
                       .phase(s_phase), .smp_end(s_smp_end), .ovf(ovf_s));

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_restart, n_done;
  int area_wr [4];   // writes into v / u / r / o areas (row pass)

  always @(negedge core_rst_n) if (rst_n && busy) n_restart++;
  always @(posedge clk) if (rst_n && done) n_done++;
  always @(posedge clk)
    if (rst_n && busy && dut.m_we && !dut.inv && !dut.col_pass) begin
      int p;
      p = int'(dut.m_addr) % COLS;
      if (p < COLS / 8) area_wr[0]++;
      else if (p < COLS / 4) area_wr[1]++;
      else if (p < COLS / 2) area_wr[2]++;
      else area_wr[3]++;
    end

  int orig [], img [], exp_img [];

  task automatic host_write(const ref int im []);
    for (int a = 0; a < NPIX; a++) begin
      @(negedge clk);
      h_we = 1'b1; h_addr = MAW'(a); h_wdata = 8'(im[a]);
    end
    @(negedge clk);
    h_we = 1'b0;
  endtask

  task automatic host_read(ref int im []);
    im = new[NPIX];
    @(negedge clk);
    h_addr = '0;
    for (int a = 0; a < NPIX; a++) begin
      @(negedge clk);
      im[a] = int'(h_rdata);
      h_addr = MAW'(a + 1);
    end
  endtask

  task automatic compare(string what, const ref int got [], const ref int ex []);
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

  task automatic run(bit inv);
    int t0, n0;
    n0 = n_restart;
    @(negedge clk);
    start = 1'b1; inverse = inv;
    @(negedge clk);
    start = 1'b0; inverse = 1'b0;
    checks++; if (!busy) begin failures++; $display("busy not raised"); end
    // a second request while busy must be ignored
    repeat (50) @(negedge clk);
    start = 1'b1; inverse = ~inv;
    @(negedge clk);
    start = 1'b0;
    t0 = 0;
    while (busy) begin @(negedge clk); t0++; end
    checks++; if (n_restart - n0 != ROWS + COLS) begin
      failures++; $display("%0d line restarts, expected %0d", n_restart - n0, ROWS + COLS);
    end
    repeat (5) @(negedge clk);
    checks++; if (busy) begin failures++; $display("ignored start was accepted"); end
    if (inv) $display("synthesis took %0d clocks", t0);
    else     $display("analysis took %0d clocks", t0);
  endtask

  initial begin
    int nc, nd0;
    orig = new[NPIX];
    for (int r = 0; r < ROWS; r++)
      for (int q = 0; q < COLS; q++) begin
        int v;
        if (r < 12 && q < 24)      v = 40 + 6 * q + 3 * r;             // gradient
        else if (r >= 16 && q >= 32) v = ((r / 4 + q / 4) % 2 != 0) ? 255 : 0; // checkerboard
        else                        v = $urandom_range(0, 255);
        orig[r * COLS + q] = v;
      end

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    checks++; if (busy) begin failures++; $display("busy after reset"); end

    host_write(orig);
    host_read(img);
    compare("host port", img, orig);

    // 2-D analysis
    nd0 = n_done;
    run(1'b0);
    checks++; if (n_done - nd0 != 1) begin failures++; $display("done pulses %0d", n_done - nd0); end
    exp_img = orig;
    img2d(exp_img, COLS, ROWS, 1'b0, DLY, nc);
    host_read(img);
    compare("analysis", img, exp_img);
    $display("analysis clamps in reference: %0d", nc);
    for (int b = 0; b < 4; b++) begin
      checks++;
      if (area_wr[b] == 0) begin failures++; $display("no write into sub-band area %0d", b); end
    end
    checks++;
    if (area_wr[0] != ROWS * COLS / 8 || area_wr[3] != ROWS * COLS / 2) begin
      failures++; $display("area writes %0d/%0d/%0d/%0d", area_wr[0], area_wr[1], area_wr[2], area_wr[3]);
    end

    // 2-D synthesis of the stored coefficients
    nd0 = n_done;
    run(1'b1);
    checks++; if (n_done - nd0 != 1) begin failures++; $display("done pulses %0d", n_done - nd0); end
    img2d(exp_img, COLS, ROWS, 1'b1, DLY, nc);
    host_read(img);
    compare("synthesis", img, exp_img);

    begin
      real e, sig;
      e = 0.0; sig = 0.0;
      for (int r = 0; r < 12; r++)
        for (int q = 0; q < 24; q++) begin
          e   += (img[r * COLS + q] - orig[r * COLS + q]) ** 2;
          sig += 255.0 * 255.0;
        end
      $display("gradient area PSNR after analysis + synthesis: %0.1f dB",
               10.0 * $log10(sig / (e + 1.0e-9)));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
