// decoder_3x8: 3-to-8 line decoder. Output line e[v] is 1 exactly when the
// 3-bit input s has the value v, so e is one-hot. In the Hamming (7,4)
// decoder it turns the syndrome into one line per possible error position
// (e[0] is the no-error line). Combinational.
//
// The block and its 3x8 size come from the document; the decoder itself is
// the ordinary one.
module decoder_3x8 (
  input  logic [2:0] s,
  output logic [7:0] e
);

  always_comb begin
    e = '0;
    e[s] = 1'b1;
  end

endmodule
