// dwt_synthesis: folded three-level DWT synthesis (inverse of dwt_analysis)
// with two processing elements.
//
// Up-sampling by two inserts zeros, so each reconstructed value needs only
// four MACs: two taps on the high-pass band and two on the low-pass band.
// Operands are (current high-pass, previous high-pass, current low-pass,
// previous low-pass) of one stage, e.g. (u(0), u(-8), v(0), v(-8)) for the
// third stage. The element behind register O_even applies (g3, g1, h3, h1),
// the one behind O_odd (g2, g0, h2, h0). Work per phase, repeating every
// eight sample periods (stage 3 in phase 0, stage 2 in phases 2 and 6,
// stage 1 in the odd phases, phase 4 idle):
//   phase:      0     1       2       3      4   5      6       7
//   operands:  u,v   o,p'    r,s'    o,p'    -  o,p'   r,s'    o,p'
//
// The input stream is the analysis output stream (same phase numbering). It
// runs through the delay line D1-D12, from which the high-pass operands and
// the third-stage low-pass operands are tapped. The intermediate low-pass
// results s' and p' and the odd output samples are kept in R1-R5, loaded
// from the FPE outputs O_even / O_odd or fed back (R4 -> R1 and R5 -> R4 in
// phase 5). Operand multiplexer per tap (csel):
//   csel 0: phase 0 -> D4, phases 2,4,6 -> D8, odd -> D10
//   csel 1: D12
//   csel 2: phase 0 -> input, phases 3,7 -> O_even, 6 -> R1, else R2
//   csel 3: phase 0 -> D8, 2 -> R5, phases 1,5 -> R3, else R4
// Register inputs: R1 <= (phase 5 ? R4 : O_odd), R2 <= (even ? R1 : O_even),
// R3 <= R2, R4 <= (phase 5 ? R5 : R3), R5 <= R4.
// Output: O_even in even phases, R1 in odd phases.
//
// Interface and timing: four clock cycles per sample period, din held for
// the whole period. With the analysis output on din, dout carries one
// reconstructed sample per period: in even phases the O_even result of the
// previous period, in odd phases the O_odd result held one period in R1.
// ovf is the OR of the two FPE flags.
//
// Accuracy: the folded schedule pairs each stage's high-pass input with the
// low-pass values the stage below has just produced, so the
// inverse is exact only for slowly varying signals. A slow full-scale
// sinusoid comes back about 33 samples later with roughly 27 dB SNR after
// 8-bit rounding; fast edges leave an echo.
//
// The schedule, register allocation and multiplexing follow the folded
// synthesis architecture of the design, and the coefficient pairing above
// is the one whose reconstruction is in time order; the single MAC-rate
// clock is this design's choice.
module dwt_synthesis
  import dwt_pkg::*;
#(
  parameter coef_set_t EVEN_C = SYN_EVEN,  // taps of the O_even element
  parameter coef_set_t ODD_C  = SYN_ODD    // taps of the O_odd element
) (
  input  logic    clk,
  input  logic    rst_n,
  input  sample_t din,
  output sample_t dout,
  output phase_t  phase,
  output logic    smp_end,
  output logic    ovf
);

  tap_t   csel;
  sel_s_t sel;

  dwt_ctrl_s u_ctrl (
    .clk    (clk),
    .rst_n  (rst_n),
    .csel   (csel),
    .phase  (phase),
    .smp_end(smp_end),
    .sel    (sel)
  );

  sample_t d [1:12];
  sample_t r1, r2, r3, r4, r5;
  sample_t o_even, o_odd;
  sample_t mux0, mux1, mux2, mux3, opnd;
  sample_t in_r1, in_r2, in_r4;
  logic    ovf_e, ovf_o;

  always_comb begin
    mux0 = sel.s2k ? (sel.s8k ? d[4] : d[8]) : d[10];
    mux1 = d[12];
    mux2 = (sel.s8k | sel.s4k3) ? (sel.s8k ? din : o_even)
                                : (sel.s8k6 ? r1 : r2);
    mux3 = (sel.s8k | sel.s8k2) ? (sel.s8k ? d[8] : r5)
                                : ((sel.s8k1 | sel.s8k5) ? r3 : r4);
    unique case (csel)
      2'd0: opnd = mux0;
      2'd1: opnd = mux1;
      2'd2: opnd = mux2;
      2'd3: opnd = mux3;
    endcase
  end

  fpe u_pe_even (
    .clk  (clk),
    .rst_n(rst_n),
    .csel (csel),
    .coefs(EVEN_C),
    .din  (opnd),
    .dout (o_even),
    .ovf  (ovf_e)
  );

  fpe u_pe_odd (
    .clk  (clk),
    .rst_n(rst_n),
    .csel (csel),
    .coefs(ODD_C),
    .din  (opnd),
    .dout (o_odd),
    .ovf  (ovf_o)
  );

  assign in_r1 = sel.s8k5 ? r4 : o_odd;
  assign in_r2 = sel.s2k  ? r1 : o_even;
  assign in_r4 = sel.s8k5 ? r5 : r3;
  assign dout  = sel.s2k  ? o_even : r1;
  assign ovf   = ovf_e | ovf_o;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 1; k <= 12; k++) d[k] <= '0;
      {r1, r2, r3, r4, r5} <= '0;
    end else if (smp_end) begin
      d[1] <= din;
      for (int k = 2; k <= 12; k++) d[k] <= d[k-1];
      r1 <= in_r1; r2 <= in_r2; r3 <= r2; r4 <= in_r4; r5 <= r4;
    end
  end

endmodule
