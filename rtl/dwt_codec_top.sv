// dwt_codec_top: three-level DWT coder and decoder for 8-bit pixels, with a
// streaming path and an image (2-D) path that share the two 1-D cores.
//
// Streaming path (while the image sequencer is idle): unsigned pixels enter
// the analysis core after conversion to two's complement (inverting the
// MSB, i.e. subtracting 128). The coefficient stream, one coefficient per
// sample period, interleaved by sub-band as given by coef_band, is brought
// out and also fed straight to the synthesis core, which decodes it as it
// is produced. The synthesis output is turned back into an unsigned pixel
// by inverting the MSB again.
//
// Image path: dwt2d_image holds a COLS x ROWS image memory loaded and read
// through the img_* host port. img_start runs the separable 2-D analysis
// (img_inverse = 0) or synthesis (img_inverse = 1) in place: every row, then
// every column, each line through the same cores. While img_busy is high
// the image sequencer drives the core inputs and restarts the cores for
// each line, so the streaming outputs carry no user data.
//
// Timing: four clock cycles per sample; pixel_in must hold pixel n for the
// whole period with phase n mod 8 (phase 0 right after reset); smp_end marks
// the last cycle of each period. pixel_out in period n is the synthesis
// result i'(n-12) of the coefficient stream. ovf_a / ovf_s flag a clamped or
// overflowed FPE result in the analysis / synthesis core. img_rdata is the
// byte at the img_addr of the previous clock.
//
// The 1-D cores and the image memory organisation follow the design; the
// shared-core arrangement with a streaming mode is this design's choice.
module dwt_codec_top
  import dwt_pkg::*;
#(
  parameter int COLS  = 640,
  parameter int ROWS  = 480,
  localparam int IMAW = $clog2(COLS * ROWS)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] pixel_in,
  output sample_t    coef_out,
  output band_t      coef_band,
  output phase_t     phase,
  output logic       smp_end,
  output logic [7:0] pixel_out,
  output logic       ovf_a,
  output logic       ovf_s,
  input  logic       img_start,
  input  logic       img_inverse,
  output logic       img_busy,
  output logic       img_done,
  input  logic       img_we,
  input  logic [IMAW-1:0] img_addr,
  input  logic [7:0] img_wdata,
  output logic [7:0] img_rdata
);

  sample_t a_in, s_in, s_out, img_a_din, img_s_din;
  phase_t  s_phase;
  logic    s_smp_end, core_rst_n;

  assign a_in = img_busy ? img_a_din : sample_t'({~pixel_in[7], pixel_in[6:0]});
  assign s_in = img_busy ? img_s_din : coef_out;

  dwt_analysis u_ana (
    .clk    (clk),
    .rst_n  (core_rst_n),
    .din    (a_in),
    .dout   (coef_out),
    .band   (coef_band),
    .phase  (phase),
    .smp_end(smp_end),
    .ovf    (ovf_a)
  );

  dwt_synthesis u_syn (
    .clk    (clk),
    .rst_n  (core_rst_n),
    .din    (s_in),
    .dout   (s_out),
    .phase  (s_phase),
    .smp_end(s_smp_end),
    .ovf    (ovf_s)
  );

  assign pixel_out = {~s_out[7], s_out[6:0]};

  dwt2d_image #(
    .COLS(COLS),
    .ROWS(ROWS)
  ) u_img (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (img_start),
    .inverse   (img_inverse),
    .busy      (img_busy),
    .done      (img_done),
    .h_we      (img_we),
    .h_addr    (img_addr),
    .h_wdata   (img_wdata),
    .h_rdata   (img_rdata),
    .core_rst_n(core_rst_n),
    .a_din     (img_a_din),
    .a_dout    (coef_out),
    .s_din     (img_s_din),
    .s_dout    (s_out),
    .smp_end   (smp_end)
  );

  // Both controllers leave reset together and must stay in step
  assert property (@(posedge clk) s_phase == phase && s_smp_end == smp_end)
    else $error("analysis and synthesis controllers out of step");

endmodule
