// tc_mux_encoder - thermometer-code to binary encoder built only from 2:1
// multiplexers, as used after the comparator chain of a flash ADC.
//
// A flash ADC of N_BITS bits has 2**N_BITS - 1 comparators whose outputs
// C1 .. C(2**N_BITS-1) form a thermometer code: ones from C1 up to the
// level of the input, zeros above. The encoder is a binary search done in
// hardware. The middle comparator C(2**(N_BITS-1)) is the MSB; it also
// selects, in a rank of multiplexers, either the upper or the lower half of
// the code, which leaves a thermometer code half as long. Its middle bit is
// the next binary bit and selects the next rank, and so on, until one bit,
// the LSB, is left. For the default N_BITS = 4 this is 7 + 3 + 1 = 11
// multiplexers in three ranks:
//   X3 = C8                      (a wire, also the select of rank 1)
//   rank 1: T7..T1 = C8 ? C15..C9 : C7..C1
//   X2 = T4                      (also the select of rank 2)
//   rank 2: U3..U1 = T4 ? T7..T5 : T3..T1
//   X1 = U2                      (also the select of rank 3)
//   rank 3: X0 = U2 ? U3 : U1
// In general the tree has 2**N_BITS - N_BITS - 1 multiplexers and the
// critical path from C(2**(N_BITS-1)) to X0 runs through N_BITS - 1 of them,
// each on its select input.
//
// Interface: therm_i[j] is comparator Cj; bin_o is the binary count of ones
// for a valid thermometer code. The block is purely combinational (no
// clock, no reset): bin_o settles one tree delay after therm_i changes.
// Codes with bubbles are encoded by the same binary search without
// correction.
//
// The tree, its input pairing and the 4-bit default follow the reference
// encoder; the generalisation to any N_BITS >= 2 is this design's own.
module tc_mux_encoder #(
  parameter int unsigned N_BITS = 4  // binary output width
) (
  input  logic [2**N_BITS-1:1] therm_i,  // thermometer code, bit j = Cj
  output logic [N_BITS-1:0]    bin_o     // binary code, bin_o[k] = Xk
);

  localparam int unsigned W = 2**N_BITS - 1;  // number of comparator inputs

  if (N_BITS < 2) begin : g_bad_n
    $error("tc_mux_encoder: N_BITS must be at least 2");
  end

  // code[k] carries the (2**k - 1)-bit thermometer code that enters the rank
  // of level k, in its low bits; the bits above are unused and tied off.
  logic [N_BITS:1][W:1] code;

  assign code[N_BITS] = therm_i;

  for (genvar k = N_BITS; k >= 2; k--) begin : g_rank
    localparam int unsigned WO = 2**(k-1) - 1;  // width of the folded code

    mux_rank #(.K(k)) u_rank (
      .code_i (code[k][2**k-1:1]),
      .sel_o  (bin_o[k-1]),
      .code_o (code[k-1][WO:1])
    );

    assign code[k-1][W:WO+1] = '0;
  end

  assign bin_o[0] = code[1][1];

endmodule
