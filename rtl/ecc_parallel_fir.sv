// ecc_parallel_fir: K parallel FIR filters with the same coefficients,
// protected against a fault in any one filter by a word-level Hamming code.
//
// Each data filter i filters its own input x_i. The check encoder adds the
// inputs of the data filters covered by each check, and R redundant filters
// (identical to the data filters but wider) filter those sums. Because the
// filter is linear, a check filter's output equals the sum of the covered
// data outputs, up to quantization. The fault corrector compares the two,
// locates a faulty filter from the pattern of failing checks and rebuilds
// its output from the check filter and the other data outputs.
// For K=4 there are three check filters (x5=x1+x2+x3, x6=x1+x2+x4,
// x7=x1+x3+x4); for K=11 there are four.
//
// Timing: a set of K samples is taken on a cycle with en high; the corrected
// outputs yc and the status flags belong to that set on the next cycle, when
// out_valid is high. One set of samples per cycle. rst_n: active-low,
// synchronous.
//
// From the document: the structure (data filters, encoder, check filters,
// single fault correction), the sizes and the two configurations K=4 and
// K=11. This design's own choices: the clocking, the flags and the check
// assignment for K other than 4 (see ecc_pkg).
module ecc_parallel_fir #(
  parameter int unsigned K      = ecc_pkg::K_DEF,
  parameter int unsigned TAPS   = ecc_pkg::TAPS_DEF,
  parameter int unsigned IN_W   = ecc_pkg::IN_W_DEF,
  parameter int unsigned COEF_W = ecc_pkg::COEF_W_DEF,
  parameter int unsigned OUT_W  = ecc_pkg::OUT_W_DEF,
  parameter int unsigned THRESH = ecc_pkg::max_weight(K),
  localparam int unsigned R     = ecc_pkg::num_checks(K),
  localparam int unsigned IDX_W = (K > 1) ? $clog2(K) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic signed [IN_W-1:0]   x    [K],
  input  logic signed [COEF_W-1:0] coef [TAPS],
  output logic                     out_valid,
  output logic signed [OUT_W-1:0]  yc   [K],
  output logic [R-1:0]             syndrome,
  output logic                     err_detect,
  output logic                     err_data,
  output logic                     err_check,
  output logic                     err_uncorrectable,
  output logic [IDX_W-1:0]         err_index
);

  localparam int unsigned G    = ecc_pkg::growth_bits(K);
  localparam int unsigned XC_W = IN_W + G;
  localparam int unsigned Z_W  = OUT_W + G;

  logic signed [XC_W-1:0] xc [R];
  logic signed [OUT_W-1:0] y [K];
  logic signed [Z_W-1:0]   z [R];

  // Original modules.
  for (genvar i = 0; i < K; i++) begin : g_data
    fir_filter #(.TAPS(TAPS), .IN_W(IN_W), .COEF_W(COEF_W), .OUT_W(OUT_W)) u_fir (
      .clk, .rst_n, .en, .x(x[i]), .coef, .y(y[i])
    );
  end

  // Encoder for the redundant modules.
  check_encoder #(.K(K), .IN_W(IN_W)) u_enc (.x, .xc);

  // Redundant modules.
  for (genvar j = 0; j < R; j++) begin : g_check
    fir_filter #(.TAPS(TAPS), .IN_W(XC_W), .COEF_W(COEF_W), .OUT_W(Z_W)) u_fir (
      .clk, .rst_n, .en, .x(xc[j]), .coef, .y(z[j])
    );
  end

  fault_corrector #(.K(K), .OUT_W(OUT_W), .THRESH(THRESH)) u_fix (
    .y, .z, .yc, .syndrome, .err_detect, .err_data, .err_check,
    .err_uncorrectable, .err_index
  );

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= en;
  end

endmodule
