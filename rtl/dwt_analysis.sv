// dwt_analysis: folded three-level DWT analysis (Daubechies length-4) with
// two processing elements and a register file found by modified
// forward-backward register allocation.
//
// The three filter stages of the dyadic tree are folded onto one high-pass
// FPE (g taps) and one low-pass FPE (h taps) that share one operand
// multiplexer. Their work repeats every eight sample periods:
//   phase:     0     1     2     3     4     5     6     7
//   G FPE:   o(0)  r(0)  o(2)  u(0)  o(4)  r(4)  o(6)   -
//   H FPE:   p(0)  s(0)  p(2)  v(0)  p(4)  s(4)  p(6)   -
// where o,p are the first-stage high/low-pass outputs, r,s the second and
// u,v the third, and the index is the input sample index. In even phases
// the operands are the input and its three predecessors (delay line
// D1-D3). In odd phases they are earlier low-pass results, kept in the
// chain H_out -> R1 -> R2 -> R3 -> R4 -> R5 -> R6 -> R7; values that live
// longer than the chain are fed back from R7 into R5 in phases 0, 1 and 5
// (from R4 otherwise). The operand multiplexer per tap (csel) is:
//   csel 0: even -> input,  phases 1,5 -> H_out, phases 3,7 -> R1
//   csel 1: even -> D1,     phases 1,5 -> R2,    phases 3,7 -> R5
//   csel 2: even -> D2,     phases 1,5 -> R4,    phases 3,7 -> R6
//   csel 3: even -> D3,     phases 1,5 -> R6,    phases 3,7 -> R7
// The output is the G FPE register except in phase 0, where the third-stage
// low-pass v is taken from R4.
//
// Interface and timing: one sample period is four clock cycles (one MAC per
// cycle). Sample i(n) must be on din during the whole period with phase
// n mod 8; the first sample after reset is i(0) in phase 0. dout in phase
// n carries o(n-1) for odd n, r(n-2) for n mod 8 = 2 or 6, u(n-4) for
// n mod 8 = 4 and v(n-8) for n mod 8 = 0; band names which. So N inputs
// give N coefficients, interleaved. ovf is the OR of the two FPE flags.
// Everything before sample 0 counts as zero (registers reset to zero).
//
// The schedule, register allocation and multiplexing follow the folded
// architecture of the design; the single MAC-rate clock with a sample-end
// strobe (instead of separate filter and sample clocks) is this design's
// choice.
module dwt_analysis
  import dwt_pkg::*;
#(
  parameter coef_set_t HC = H_ANA,   // low-pass taps
  parameter coef_set_t GC = G_ANA    // high-pass taps
) (
  input  logic    clk,
  input  logic    rst_n,
  input  sample_t din,
  output sample_t dout,
  output band_t   band,
  output phase_t  phase,
  output logic    smp_end,
  output logic    ovf
);

  tap_t   csel;
  sel_a_t sel;

  dwt_ctrl_a u_ctrl (
    .clk    (clk),
    .rst_n  (rst_n),
    .csel   (csel),
    .phase  (phase),
    .smp_end(smp_end),
    .sel    (sel)
  );

  sample_t d1, d2, d3;
  sample_t r1, r2, r3, r4, r5, r6, r7;
  sample_t h_out, g_out;
  sample_t mux0, mux1, mux2, mux3, opnd, in_r5;
  logic    ovf_g, ovf_h;

  // operand multiplexers (Table-5 style scheme, see header)
  always_comb begin
    mux0 = sel.s2k ? din : (sel.s4k1 ? h_out : r1);
    mux1 = sel.s2k ? d1  : (sel.s4k1 ? r2    : r5);
    mux2 = sel.s2k ? d2  : (sel.s4k1 ? r4    : r6);
    mux3 = sel.s2k ? d3  : (sel.s4k1 ? r6    : r7);
    unique case (csel)
      2'd0: opnd = mux0;
      2'd1: opnd = mux1;
      2'd2: opnd = mux2;
      2'd3: opnd = mux3;
    endcase
  end

  fpe u_pe_g (
    .clk  (clk),
    .rst_n(rst_n),
    .csel (csel),
    .coefs(GC),
    .din  (opnd),
    .dout (g_out),
    .ovf  (ovf_g)
  );

  fpe u_pe_h (
    .clk  (clk),
    .rst_n(rst_n),
    .csel (csel),
    .coefs(HC),
    .din  (opnd),
    .dout (h_out),
    .ovf  (ovf_h)
  );

  // feedback into R5: from R7 in phases 0, 1, 5, else from R4
  assign in_r5 = (sel.s4k1 | sel.s8k) ? r7 : r4;
  assign dout  = sel.s8k ? r4 : g_out;
  assign band  = band_of_phase(phase);
  assign ovf   = ovf_g | ovf_h;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {d1, d2, d3}                 <= '0;
      {r1, r2, r3, r4, r5, r6, r7} <= '0;
    end else if (smp_end) begin
      d1 <= din;  d2 <= d1;  d3 <= d2;
      r1 <= h_out; r2 <= r1; r3 <= r2; r4 <= r3;
      r5 <= in_r5; r6 <= r5; r7 <= r6;
    end
  end

endmodule
