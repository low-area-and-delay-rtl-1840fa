// checker_bit_gen: syndrome generator of the Hamming (7,4) decoder.
//
// Recomputes each parity check from the received word and compares it with
// the received parity bit, which is the same as
//   s1 = y1 ^ y2 ^ y3 ^ y5     (d1 ^ d2 ^ d3 ^ p1)
//   s2 = y1 ^ y2 ^ y4 ^ y6     (d1 ^ d2 ^ d4 ^ p2)
//   s3 = y1 ^ y3 ^ y4 ^ y7     (d1 ^ d3 ^ d4 ^ p3)
// i.e. s = y * H^T with H = [1110100; 1101010; 1011001]. Each syndrome bit is
// its own chain of three Feynman gates.
//
// Interface: y[6:0] carries y1 in bit 6 down to y7 in bit 0 (see
// hamming_encoder). The syndrome s[2:0] = {s1, s2, s3}, so that its binary
// value reads as in the syndrome table (111 = d1 ... 001 = p3).
// Combinational.
//
// From the document: the parity equations and the block name. This design's
// own choice: the Feynman gate arrangement and the syndrome bit order.
module checker_bit_gen (
  input  logic [6:0] y,
  output logic [2:0] s
);

  logic d1, d2, d3, d4, p1, p2, p3;
  logic [5:0] t;
  logic s1, s2, s3;
  logic [8:0] garbage;

  assign {d1, d2, d3, d4, p1, p2, p3} = y;

  feynman_gate u_s1a (.a(d2), .b(d1),   .p(garbage[0]), .q(t[0]));
  feynman_gate u_s1b (.a(d3), .b(t[0]), .p(garbage[1]), .q(t[1]));
  feynman_gate u_s1c (.a(p1), .b(t[1]), .p(garbage[2]), .q(s1));
  feynman_gate u_s2a (.a(d2), .b(d1),   .p(garbage[3]), .q(t[2]));
  feynman_gate u_s2b (.a(d4), .b(t[2]), .p(garbage[4]), .q(t[3]));
  feynman_gate u_s2c (.a(p2), .b(t[3]), .p(garbage[5]), .q(s2));
  feynman_gate u_s3a (.a(d3), .b(d1),   .p(garbage[6]), .q(t[4]));
  feynman_gate u_s3b (.a(d4), .b(t[4]), .p(garbage[7]), .q(t[5]));
  feynman_gate u_s3c (.a(p3), .b(t[5]), .p(garbage[8]), .q(s3));

  assign s = {s1, s2, s3};

endmodule
