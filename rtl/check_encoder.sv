// check_encoder: forms the inputs of the redundant (check) filters.
//
// Word-level Hamming encoding: check input j is the arithmetic sum of the data
// inputs that check j covers (see ecc_pkg). For the four-filter bank this is
//   x5 = x1 + x2 + x3,  x6 = x1 + x2 + x4,  x7 = x1 + x3 + x4.
// Sums are signed and widened by ecc_pkg::growth_bits(K) bits so that they
// never overflow (8-bit inputs give 10-bit check inputs for K=4).
// Each sum is computed from the inputs on its own, with no partial sum shared
// between checks, so that a fault in one adder can disturb only one check.
// (A synthesis tool may still merge common terms unless told to keep
// hierarchy; this RTL does not share them.)
//
// Purely combinational; no clock.
//
// From the document: the three sums, the 10-bit check input width and the
// rule against logic sharing. This design's own choice: signed arithmetic and
// the check assignment for sizes other than K=4 (ecc_pkg).
module check_encoder #(
  parameter int unsigned K    = ecc_pkg::K_DEF,
  parameter int unsigned IN_W = ecc_pkg::IN_W_DEF,
  localparam int unsigned R   = ecc_pkg::num_checks(K),
  localparam int unsigned XC_W = IN_W + ecc_pkg::growth_bits(K)
) (
  input  logic signed [IN_W-1:0] x  [K],
  output logic signed [XC_W-1:0] xc [R]
);

  for (genvar j = 0; j < R; j++) begin : g_check
    always_comb begin
      xc[j] = '0;
      for (int i = 0; i < K; i++)
        if (ecc_pkg::in_check(R, i, j)) xc[j] += XC_W'(x[i]);
    end
  end

endmodule
