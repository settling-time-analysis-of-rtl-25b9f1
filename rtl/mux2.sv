// mux2 - single-bit 2:1 multiplexer, the only cell of the thermometer-code
// encoder tree.
//
// Function: z = a when sel is 1, z = b when sel is 0, written as the
// sum-of-products z = a.sel + b.sel' that defines the cell. There is no
// clock and no state: the output follows the inputs combinationally, and in
// silicon its delay is the per-stage delay that adds up along the encoder tree.
//
// The port names (A, B, Sel, Z) and the select polarity follow the reference
// cell; the lower-case spelling is this design's convention.
module mux2 (
  input  logic a,    // data input passed when sel = 1
  input  logic b,    // data input passed when sel = 0
  input  logic sel,  // select line
  output logic z     // selected data
);

  always_comb z = (a & sel) | (b & ~sel);

endmodule
