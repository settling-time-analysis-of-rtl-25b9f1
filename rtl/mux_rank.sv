// mux_rank - one rank of the multiplexer-tree thermometer-code encoder.
//
// A valid thermometer code of W = 2**K - 1 bits (code_i[1] is the lowest
// comparator, code_i[W] the highest) has exactly one useful bit at its
// middle position M = 2**(K-1): it is 1 if and only if the value is at least
// M, so it is the most significant bit of the binary result (sel_o). The rank
// then uses that same bit as the shared select of M-1 2:1 multiplexers
// (mux2). Multiplexer j (j = 1 .. M-1) passes code_i[M+j] when sel_o = 1 and
// code_i[j] when sel_o = 0, so code_o is again a thermometer code, of
// 2**(K-1) - 1 bits, holding the value that is left once the MSB is removed.
// With K = 4 this is the first rank of the 4-bit encoder: seven multiplexers
// selected by C8, pairing C15/C7, C14/C6, ... C9/C1. With K = 2 it is the
// single last multiplexer, whose one-bit code_o is the LSB.
//
// Purely combinational; no clock, no reset. Inputs that are not a
// thermometer code (bubbles) are folded the same way without any correction.
// The fold structure and the input pairing follow the reference encoder; the
// parameterisation by K is this design's own.
module mux_rank #(
  parameter int unsigned K = 4  // the rank folds a (2**K - 1)-bit code
) (
  input  logic [2**K-1:1]     code_i,  // thermometer code in, bit j = Cj
  output logic                sel_o,   // middle bit = binary bit K-1 of the value
  output logic [2**(K-1)-1:1] code_o   // folded thermometer code out
);

  localparam int unsigned M = 2**(K-1);  // position of the middle bit

  if (K < 2) begin : g_bad_k
    $error("mux_rank: K must be at least 2");
  end

  assign sel_o = code_i[M];

  for (genvar j = 1; j < M; j++) begin : g_mux
    mux2 u_mux (
      .a   (code_i[M+j]),
      .b   (code_i[j]),
      .sel (sel_o),
      .z   (code_o[j])
    );
  end

endmodule
