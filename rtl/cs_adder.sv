// cs_adder: W-bit carry-select adder with carry in, carry out and signed
// overflow flag.
//
// The operands are cut into groups of G bits. Every group is added twice in
// parallel, once assuming a carry in of 0 and once of 1 (the lowest group
// uses the real carry in). Neighbouring blocks are then merged pairwise in
// log2(W/G) levels: the upper half of a merged block takes the version
// selected by the carry out of the lower half, for both assumptions of the
// block's own carry in. This is the recursive form of the split adder in
// which an n/2-bit adder's carry selects between two precomputed n/2-bit
// sums, applied down to 4-bit groups. Purely combinational.
//
// ovf is set when a and b have the same sign and the sum has the other sign.
// The FPE drives cin with the sign of the multiplier's ones' complement
// product, which completes its two's complement.
module cs_adder #(
  parameter int unsigned W = 32,   // width, a power-of-two multiple of G
  parameter int unsigned G = 4     // group width
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout,
  output logic         ovf
);

  localparam int unsigned NG = W / G;
  localparam int unsigned LV = $clog2(NG);

  // Per level: sums and block carries assuming block carry-in 0 (f) or 1 (t)
  logic [W-1:0]  sf [LV+1];
  logic [W-1:0]  st [LV+1];
  logic [NG-1:0] cf [LV+1];
  logic [NG-1:0] ct [LV+1];

  for (genvar j = 0; j < NG; j++) begin : g_grp
    logic [G:0] rf, rt;
    if (j == 0) begin : g_low
      assign rf = {1'b0, a[G-1:0]} + {1'b0, b[G-1:0]} + {{G{1'b0}}, cin};
      assign rt = rf;
    end else begin : g_high
      assign rf = {1'b0, a[j*G +: G]} + {1'b0, b[j*G +: G]};
      assign rt = {1'b0, a[j*G +: G]} + {1'b0, b[j*G +: G]} + {{G{1'b0}}, 1'b1};
    end
    assign sf[0][j*G +: G] = rf[G-1:0];
    assign st[0][j*G +: G] = rt[G-1:0];
    assign cf[0][j]        = rf[G];
    assign ct[0][j]        = rt[G];
  end

  for (genvar l = 1; l <= LV; l++) begin : g_lvl
    localparam int unsigned H  = G << (l - 1);   // half-block width
    localparam int unsigned NB = NG >> l;        // blocks at this level
    for (genvar j = 0; j < NB; j++) begin : g_blk
      // lower half is child 2j, upper half child 2j+1 of the level below
      assign sf[l][2*j*H +: H]     = sf[l-1][2*j*H +: H];
      assign st[l][2*j*H +: H]     = st[l-1][2*j*H +: H];
      assign sf[l][(2*j+1)*H +: H] = cf[l-1][2*j] ? st[l-1][(2*j+1)*H +: H]
                                                  : sf[l-1][(2*j+1)*H +: H];
      assign st[l][(2*j+1)*H +: H] = ct[l-1][2*j] ? st[l-1][(2*j+1)*H +: H]
                                                  : sf[l-1][(2*j+1)*H +: H];
      assign cf[l][j] = cf[l-1][2*j] ? ct[l-1][2*j+1] : cf[l-1][2*j+1];
      assign ct[l][j] = ct[l-1][2*j] ? ct[l-1][2*j+1] : cf[l-1][2*j+1];
    end
    if (NB < NG) begin : g_pad
      assign cf[l][NG-1:NB] = '0;
      assign ct[l][NG-1:NB] = '0;
    end
  end

  assign sum  = sf[LV];
  assign cout = cf[LV][0];
  assign ovf  = (a[W-1] == b[W-1]) && (sum[W-1] != a[W-1]);

endmodule
