// fault_corrector: single fault correction for a bank of K parallel filters
// protected by R redundant check filters.
//
// For each check j it forms the word-level syndrome
//   s_j = (sum of the data outputs y_i that check j covers) - z_j
// and classifies it: |s_j| < THRESH counts as 0, anything else as 1. The
// threshold absorbs the small mismatch that quantization leaves between a
// check filter and the sum of the data filters it mirrors: each filter drops
// low-order bits on its own, so with truncation |s_j| stays below the number
// of data filters in the check. The R classified bits form the syndrome
// (s1 in the most significant bit), which is read like a Hamming syndrome:
//   - all zero: no fault, data outputs pass through;
//   - equal to the pattern of data filter i: filter i is faulty and its output
//     is rebuilt from the first check that covers it, e.g. for filter 1
//     y_c1 = z_1 - y_2 - y_3;
//   - a single one: a check filter is faulty, data outputs pass through;
//   - anything else: more than one fault, flagged as uncorrectable, data
//     outputs pass through.
// Every syndrome and every rebuilt value is computed from the inputs on its
// own, with no shared partial sums. A rebuilt value that falls outside the
// OUT_W range is saturated.
//
// Purely combinational. Flags: err_detect (syndrome non-zero), err_data (a
// data output was replaced, err_index names it), err_check (a check filter
// was faulty), err_uncorrectable.
//
// From the document: the syndrome equations, the threshold, the syndrome
// table and the rebuilding equation. This design's own choices: the threshold
// value, the use of the first covering check for rebuilding, saturation and
// the status flags.
module fault_corrector #(
  parameter int unsigned K      = ecc_pkg::K_DEF,
  parameter int unsigned OUT_W  = ecc_pkg::OUT_W_DEF,
  parameter int unsigned THRESH = ecc_pkg::max_weight(K),
  localparam int unsigned R     = ecc_pkg::num_checks(K),
  localparam int unsigned Z_W   = OUT_W + ecc_pkg::growth_bits(K),
  localparam int unsigned IDX_W = (K > 1) ? $clog2(K) : 1
) (
  input  logic signed [OUT_W-1:0] y  [K],
  input  logic signed [Z_W-1:0]   z  [R],
  output logic signed [OUT_W-1:0] yc [K],
  output logic [R-1:0]            syndrome,
  output logic                    err_detect,
  output logic                    err_data,
  output logic                    err_check,
  output logic                    err_uncorrectable,
  output logic [IDX_W-1:0]        err_index
);

  localparam int unsigned D_W = Z_W + 2;
  localparam logic signed [D_W-1:0] OUT_MAX = D_W'((2 ** (OUT_W - 1)) - 1);
  localparam logic signed [D_W-1:0] OUT_MIN = -D_W'(2 ** (OUT_W - 1));
  localparam logic signed [D_W-1:0] TH_POS  = D_W'(THRESH);
  localparam logic signed [D_W-1:0] TH_NEG  = -D_W'(THRESH);

  logic signed [D_W-1:0] diff [R];
  logic signed [D_W-1:0] rebuilt [K];
  logic [K-1:0]          match;

  // Syndrome, one independent adder tree per check.
  for (genvar j = 0; j < R; j++) begin : g_syn
    always_comb begin
      diff[j] = -D_W'(z[j]);
      for (int i = 0; i < K; i++)
        if (ecc_pkg::in_check(R, i, j)) diff[j] += D_W'(y[i]);
      syndrome[R-1-j] = (diff[j] >= TH_POS) || (diff[j] <= TH_NEG);
    end
  end

  // Location and rebuilding of each data output.
  for (genvar i = 0; i < K; i++) begin : g_fix
    localparam int unsigned J0 = ecc_pkg::first_check(R, i);
    assign match[i] = (syndrome == R'(ecc_pkg::data_pattern(R, i)));
    always_comb begin
      rebuilt[i] = D_W'(z[J0]);
      for (int m = 0; m < K; m++)
        if (m != i && ecc_pkg::in_check(R, m, J0)) rebuilt[i] -= D_W'(y[m]);
      if (!match[i])                  yc[i] = y[i];
      else if (rebuilt[i] > OUT_MAX)  yc[i] = OUT_W'(OUT_MAX);
      else if (rebuilt[i] < OUT_MIN)  yc[i] = OUT_W'(OUT_MIN);
      else                            yc[i] = OUT_W'(rebuilt[i]);
    end
  end

  always_comb begin
    err_index = '0;
    for (int i = 0; i < K; i++)
      if (match[i]) err_index = IDX_W'(i);
  end

  assign err_detect        = |syndrome;
  assign err_data          = |match;
  assign err_check         = (syndrome != 0) && ((syndrome & (syndrome - 1'b1)) == 0);
  assign err_uncorrectable = err_detect && !err_data && !err_check;

endmodule
