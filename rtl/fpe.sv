// fpe: Fast Processing Element, a four-tap FIR multiply-accumulate unit.
//
// One output sample takes four clock cycles, one MAC per cycle, with tap
// select csel = 0..3. In each cycle the coefficient multiplexer picks coefs[csel],
// the radix-2 multiplier forms coefs[csel] * din, and the 32-bit carry-select
// adder adds the product to the accumulator (to zero when csel = 0, which
// starts a new sum). The accumulator is loaded every cycle. In the csel = 3
// cycle the complete sum is also loaded into the 8-bit output register: the
// sum is shifted right by FRAC (the coefficient fraction bits) and clamped to
// 0x7F / 0x80 when the bits above the kept field are not a sign extension.
//
// Timing: din must carry the operand that belongs to the current csel
// cycle. dout and ovf change on the clock edge that ends the csel = 3 cycle
// and hold for the next four cycles.
// ovf reports that the output just loaded was clamped or that the 32-bit
// accumulation overflowed during its four MACs; the way the flag is formed
// is this design's choice. The adder's carry out is left unused: overflow is
// judged from the signed overflow flag and the output field instead.
module fpe
  import dwt_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  tap_t      csel,
  input  coef_set_t coefs,   // coefs[k] is applied when csel = k
  input  sample_t   din,
  output sample_t   dout,
  output logic      ovf
);

  logic [CW-1:0] cmux;
  logic [AW-1:0] prod, acc_in, sum, acc;
  logic          add_ovf, add_cout, ovf_run;

  assign cmux = coefs[csel];

  radix2_mult #(.XW(CW), .YW(SW)) u_mult (
    .x   (cmux),
    .y   (din),
    .prod(prod)
  );

  assign acc_in = (csel == 2'd0) ? '0 : acc;

  cs_adder #(.W(AW), .G(4)) u_add (
    .a   (prod),
    .b   (acc_in),
    .cin (prod[AW-1]),
    .sum (sum),
    .cout(add_cout),
    .ovf (add_ovf)
  );

  // Output field and saturation: bits above FRAC+SW-1 must repeat the sign
  localparam int unsigned TOP = FRAC + SW - 1;
  logic    fits;
  sample_t sat;
  assign fits = (sum[AW-1:TOP] == '0) || (sum[AW-1:TOP] == '1);
  assign sat  = fits          ? sum[TOP -: SW] :
                sum[AW-1]     ? sample_t'({1'b1, {(SW-1){1'b0}}}) :
                                sample_t'({1'b0, {(SW-1){1'b1}}});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc     <= '0;
      ovf_run <= 1'b0;
      dout    <= '0;
      ovf     <= 1'b0;
    end else begin
      acc     <= sum;
      ovf_run <= ((csel == 2'd0) ? 1'b0 : ovf_run) | add_ovf;
      if (csel == 2'd3) begin
        dout <= sat;
        ovf  <= ~fits | ovf_run | add_ovf;
      end
    end
  end

endmodule
