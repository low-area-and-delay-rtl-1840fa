// hamming_decoder: single error correcting Hamming (7,4) decoder.
//
// Three stages, all combinational:
//   checker_bit_gen  recomputes the three parity checks -> syndrome s1 s2 s3
//   decoder_3x8      turns the syndrome into one-hot error lines
//   decode           inverts the codeword bit the syndrome names
// Any single bit error in the 7-bit word is corrected; a double error is
// miscorrected, as for any distance-3 code without an extra parity bit.
//
// Interface: y[6:0] received word (y1 in bit 6 ... y7 in bit 0, codeword
// order d1 d2 d3 d4 p1 p2 p3); d[3:0] corrected data (d1 in bit 0);
// s[2:0] syndrome {s1,s2,s3}; err is 1 when the syndrome is non-zero.
//
// From the document: the three sub-blocks and their names, the syndrome table
// and the parity equations. This design's own choice: the err flag and the
// bit order of the ports.
module hamming_decoder (
  input  logic [6:0] y,
  output logic [3:0] d,
  output logic [6:0] yc,
  output logic [2:0] s,
  output logic       err
);

  logic [7:0] e;

  checker_bit_gen c   (.y, .s);
  decoder_3x8     dec (.s, .e);
  decode          u_s (.y, .e, .yc, .d);

  assign err = |s;

endmodule
