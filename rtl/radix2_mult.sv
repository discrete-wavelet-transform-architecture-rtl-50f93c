// radix2_mult: signed XW-bit by YW-bit multiplier built as a radix-2 array of
// multiplier elements, default 25-bit filter coefficient by 8-bit sample.
//
// Both operands are first turned into magnitudes (two's complement inputs
// that are negative are negated); the product sign is the XOR of the operand
// signs. The magnitudes are multiplied by a carry-save array: row j adds
// x & y_j to the shifted sums of row j-1 and to row j-1's carries, row j's
// lowest sum bit is product bit j, and a final adder row adds the sums and
// carries left after the last row to give the high product bits.
//
// The result is returned in the "partial two's complement" form used by the
// FPE: prod[XW+YW-2] is the sign, and for a negative non-zero product the
// lower bits are the ones' complement of the magnitude, so the accumulator
// adder completes the negation by adding the sign bit as its carry in.
// Purely combinational.
//
// The multiplicand magnitude is taken on XW-1 bits, so x = -2^(XW-1) is
// outside the range (coefficients stay within +/-(2 - 2^-23)). The multiplier
// magnitude keeps YW bits, so y = -2^(YW-1) needs no special case.
module radix2_mult #(
  parameter int unsigned XW = 25,            // multiplicand (coefficient) width
  parameter int unsigned YW = 8,             // multiplier (sample) width
  parameter int unsigned PW = XW + YW - 1    // product width
) (
  input  logic [XW-1:0] x,
  input  logic [YW-1:0] y,
  output logic [PW-1:0] prod
);

  localparam int unsigned N = XW - 1;        // columns of the array

  logic [N-1:0]  xm;                         // |x|
  logic [YW-1:0] ym;                         // |y|
  logic          neg;

  assign xm  = x[XW-1] ? N'(~x[N-1:0] + 1'b1) : x[N-1:0];
  assign ym  = y[YW-1] ? YW'(~y + 1'b1)       : y;
  assign neg = x[XW-1] ^ y[YW-1];

  // s[j][i]: sum bit of row j, column i (weight 2^(i+j))
  // c[j][i]: carry bit of row j, column i (weight 2^(i+j+1))
  logic [N-1:0] s [YW];
  logic [N-1:0] c [YW];

  for (genvar j = 0; j < YW; j++) begin : g_row
    for (genvar i = 0; i < N; i++) begin : g_col
      logic pin, cin;
      if (j == 0) begin : g_first
        assign pin = 1'b0;
        assign cin = 1'b0;
      end else begin : g_next
        if (i == N - 1) begin : g_top
          assign pin = 1'b0;
        end else begin : g_mid
          assign pin = s[j-1][i+1];
        end
        assign cin = c[j-1][i];
      end
      mult_element u_me (
        .x   (xm[i]),
        .y   (ym[j]),
        .pin (pin),
        .cin (cin),
        .pout(s[j][i]),
        .cout(c[j][i])
      );
    end
  end

  // Final adder row: remaining sums and carries of the last row
  logic [N:0]       top;
  logic [YW-1:0]    low;
  logic [N+YW:0]    mag;

  assign top = {2'b00, s[YW-1][N-1:1]} + {1'b0, c[YW-1]};
  for (genvar j = 0; j < YW; j++) begin : g_low
    assign low[j] = s[j][0];
  end
  assign mag = {top, low};

  logic nz;
  assign nz   = |mag;
  assign prod = {neg & nz, (neg & nz) ? ~mag[PW-2:0] : mag[PW-2:0]};

endmodule
