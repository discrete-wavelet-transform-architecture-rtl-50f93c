// dwt_ctrl_s: controller of the folded DWT synthesis module.
//
// Same counter as the analysis controller: a free-running 5-bit counter at
// the MAC clock whose low two bits are the tap select csel and whose high
// three bits are the sample phase (index modulo 8). The synthesis
// multiplexers need these phase decodes:
//   s2k phases 0,2,4,6   s4k3 phases 3,7   s8k 0   s8k1 1   s8k2 2
//   s8k5 5               s8k6 6
// smp_end is high in the last MAC cycle of a sample period. After reset the
// counter is 0, so an analysis and a synthesis module reset together run in
// the same phase, which is what the direct analysis-to-synthesis connection
// needs.
module dwt_ctrl_s
  import dwt_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  output tap_t   csel,
  output phase_t phase,
  output logic   smp_end,
  output sel_s_t sel
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
    sel.s4k3 = (phase[1:0] == 2'd3);
    sel.s8k  = (phase == 3'd0);
    sel.s8k1 = (phase == 3'd1);
    sel.s8k2 = (phase == 3'd2);
    sel.s8k5 = (phase == 3'd5);
    sel.s8k6 = (phase == 3'd6);
  end

endmodule
