// feynman_gate: the 2x2 reversible controlled-NOT (Feynman) gate.
//
//   p = a        (control, passed through)
//   q = a ^ b    (target, inverted when the control is 1)
//
// The mapping (a,b) -> (p,q) is a bijection, so no information is lost, and
// applying the gate twice restores the inputs. The binary Hamming (7,4)
// encoder, syndrome generator and bit corrector build every XOR out of this
// gate. Outputs a circuit does not need (the copied control) are its garbage
// outputs. Combinational.
//
// The document builds the Hamming code from reversible gates but does not say
// which; using the Feynman gate for every XOR is this design's choice.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);

  assign p = a;
  assign q = a ^ b;

endmodule
