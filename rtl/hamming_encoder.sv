// hamming_encoder: Hamming (7,4) encoder built from Feynman gates.
//
//   p1 = d1 ^ d2 ^ d3
//   p2 = d1 ^ d2 ^ d4
//   p3 = d1 ^ d3 ^ d4
//
// Each parity bit is formed by its own chain of two Feynman gates, with no
// gate shared between parity bits, so that one faulty gate corrupts one
// parity bit only.
//
// Interface: d[3:0] carries d1 in bit 0 up to d4 in bit 3. The codeword
// y[6:0] is systematic and carries y1..y7 = d1 d2 d3 d4 p1 p2 p3 from bit 6
// down to bit 0, i.e. y = {d1, d2, d3, d4, p1, p2, p3}. Combinational.
//
// From the document: the parity equations, the generator matrix column order
// and the bit names d[3:0], y[6:0], d1..d4. This design's own choices: the
// Feynman gate and the gate arrangement.
module hamming_encoder (
  input  logic [3:0] d,
  output logic [6:0] y
);

  logic d1, d2, d3, d4;
  logic t1, t2, t3;           // first XOR of each parity chain
  logic p1, p2, p3;
  logic [5:0] garbage;        // copied controls, not used

  assign {d4, d3, d2, d1} = d;

  feynman_gate u_p1a (.a(d2), .b(d1), .p(garbage[0]), .q(t1));
  feynman_gate u_p1b (.a(d3), .b(t1), .p(garbage[1]), .q(p1));
  feynman_gate u_p2a (.a(d2), .b(d1), .p(garbage[2]), .q(t2));
  feynman_gate u_p2b (.a(d4), .b(t2), .p(garbage[3]), .q(p2));
  feynman_gate u_p3a (.a(d3), .b(d1), .p(garbage[4]), .q(t3));
  feynman_gate u_p3b (.a(d4), .b(t3), .p(garbage[5]), .q(p3));

  assign y = {d1, d2, d3, d4, p1, p2, p3};

endmodule
