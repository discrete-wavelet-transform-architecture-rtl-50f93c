// mult_element: one cell of the radix-2 array multiplier.
//
// The partial product bit x & y is added by a full adder to the partial
// product arriving from the row above (pin) and to the carry arriving from
// the row above (cin), giving the partial product passed down (pout) and the
// carry passed diagonally on (cout). Purely combinational.
module mult_element (
  input  logic x,      // multiplicand bit x_i
  input  logic y,      // multiplier bit y_j
  input  logic pin,    // partial product from the previous row
  input  logic cin,    // carry from the previous row
  output logic pout,   // partial product to the next row
  output logic cout    // carry to the next row
);

  logic pp;

  assign pp   = x & y;
  assign pout = pp ^ pin ^ cin;
  assign cout = (pp & pin) | (pp & cin) | (pin & cin);

endmodule
