// dwt_ctrl_a: controller of the folded DWT analysis module.
//
// A free-running 5-bit synchronous counter runs at the MAC clock. Its two
// low bits are the tap select csel (four MACs per sample period) and its
// three high bits are the sample phase, the sample index modulo 8, which
// repeats with the eight-cycle computation period of the three-level DWT.
// The multiplexer selects are decoded from the phase only:
//   s2k  phases 0,2,4,6   s4k  phases 0,4   s4k1  phases 1,5   s8k  phase 0
// smp_end is high in the last MAC cycle of a sample period; the sample-rate
// registers of the datapath load on that cycle's clock edge.
// After reset the counter is 0: phase 0, csel 0.
module dwt_ctrl_a
  import dwt_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  output tap_t   csel,
  output phase_t phase,
  output logic   smp_end,
  output sel_a_t sel
);

  logic [4:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt <= '0;
    else        cnt <= cnt + 5'd1;
  end

  assign csel    = cnt[1:0];
  assign phase   = cnt[4:2];
  assign smp_end = (csel == 2'd3);

  always_comb begin
    sel.s2k  = ~phase[0];
    sel.s4k  = (phase[1:0] == 2'd0);
    sel.s4k1 = (phase[1:0] == 2'd1);
    sel.s8k  = (phase == 3'd0);
  end

endmodule
