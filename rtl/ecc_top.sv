// ecc_top: the two error-correcting designs side by side.
//
//  * A bank of K = 4 parallel 16-tap FIR filters with the same coefficients,
//    protected by three redundant filters and single fault correction
//    (ecc_parallel_fir). Ports prefixed f_.
//  * A binary Hamming (7,4) encoder and decoder built from reversible
//    Feynman gates (hamming_encoder, hamming_decoder). Ports prefixed h_.
//    The encoder output and the decoder input are separate ports, so that a
//    channel (or an error) can be placed between them.
//
// Timing: the filter bank takes one set of samples per cycle with f_en and
// presents the corrected outputs one cycle later with f_out_valid; the
// Hamming codec is combinational. rst_n is active-low and synchronous.
module ecc_top #(
  parameter int unsigned K      = ecc_pkg::K_DEF,
  parameter int unsigned TAPS   = ecc_pkg::TAPS_DEF,
  parameter int unsigned IN_W   = ecc_pkg::IN_W_DEF,
  parameter int unsigned COEF_W = ecc_pkg::COEF_W_DEF,
  parameter int unsigned OUT_W  = ecc_pkg::OUT_W_DEF,
  localparam int unsigned R     = ecc_pkg::num_checks(K),
  localparam int unsigned IDX_W = (K > 1) ? $clog2(K) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // protected filter bank
  input  logic                     f_en,
  input  logic signed [IN_W-1:0]   f_x    [K],
  input  logic signed [COEF_W-1:0] f_coef [TAPS],
  output logic                     f_out_valid,
  output logic signed [OUT_W-1:0]  f_y    [K],
  output logic [R-1:0]             f_syndrome,
  output logic                     f_err_detect,
  output logic                     f_err_data,
  output logic                     f_err_check,
  output logic                     f_err_uncorrectable,
  output logic [IDX_W-1:0]         f_err_index,
  // Hamming (7,4) codec
  input  logic [3:0]               h_data_in,
  output logic [6:0]               h_codeword_out,
  input  logic [6:0]               h_codeword_in,
  output logic [3:0]               h_data_out,
  output logic [2:0]               h_syndrome,
  output logic                     h_err
);

  ecc_parallel_fir #(
    .K(K), .TAPS(TAPS), .IN_W(IN_W), .COEF_W(COEF_W), .OUT_W(OUT_W)
  ) u_bank (
    .clk, .rst_n, .en(f_en), .x(f_x), .coef(f_coef),
    .out_valid(f_out_valid), .yc(f_y), .syndrome(f_syndrome),
    .err_detect(f_err_detect), .err_data(f_err_data), .err_check(f_err_check),
    .err_uncorrectable(f_err_uncorrectable), .err_index(f_err_index)
  );

  hamming_encoder u_henc (.d(h_data_in), .y(h_codeword_out));

  logic [6:0] h_yc_unused;
  hamming_decoder u_hdec (
    .y(h_codeword_in), .d(h_data_out), .yc(h_yc_unused), .s(h_syndrome), .err(h_err)
  );

endmodule
