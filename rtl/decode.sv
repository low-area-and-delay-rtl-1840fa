// decode: bit corrector of the Hamming (7,4) decoder.
//
// Takes the received word y[6:0] and the one-hot syndrome lines e[7:0] from
// decoder_3x8 and inverts the bit the syndrome table names:
//   syndrome 111 -> d1, 110 -> d2, 101 -> d3, 011 -> d4,
//            100 -> p1, 010 -> p2, 001 -> p3, 000 -> no change.
// Each bit is corrected by a Feynman gate whose control is the matching
// syndrome line and whose target is the received bit.
//
// Interface: y and yc hold y1..y7 in bits 6..0; d[3:0] is the corrected data,
// d1 in bit 0 up to d4 in bit 3 (the same order as at the encoder input).
// Combinational.
//
// From the document: the syndrome table and the block name. This design's
// own choice: the Feynman gates and the extra corrected-codeword output.
module decode (
  input  logic [6:0] y,
  input  logic [7:0] e,
  output logic [6:0] yc,
  output logic [3:0] d
);

  // POS[b]: syndrome value that points at codeword bit y[b]
  // (y[0] = p3 -> 001, y[1] = p2 -> 010, ..., y[6] = d1 -> 111).
  localparam logic [2:0] POS [7] = '{3'b001, 3'b010, 3'b100, 3'b011, 3'b101, 3'b110, 3'b111};

  logic [6:0] garbage;

  for (genvar b = 0; b < 7; b++) begin : g_bit
    feynman_gate u_fix (.a(e[POS[b]]), .b(y[b]), .p(garbage[b]), .q(yc[b]));
  end

  assign d = {yc[3], yc[4], yc[5], yc[6]};

endmodule
