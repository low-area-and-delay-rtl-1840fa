// fir_filter: direct-form FIR filter y[n] = sum_{l=0}^{TAPS-1} x[n-l] * h[l].
//
// One instance is used for every original and every redundant (check) module
// of the protected filter bank; all instances share the same coefficients.
// Samples and coefficients are signed two's complement. The products are
// summed at full precision (ACC_W bits) and the result is quantized to OUT_W
// bits by dropping the SHIFT = ACC_W - OUT_W least significant bits
// (truncation toward minus infinity). With the default sizes (16 taps, 8-bit
// samples and coefficients, 18-bit output) two bits are dropped. A check
// filter is the same module with a wider input and output, so that its output
// has the same scale as the data outputs.
//
// Timing: when en is high, x is taken as x[n], the delay line shifts and y is
// updated with y[n] at the next rising clock edge (one cycle of latency, one
// sample per cycle). When en is low the filter holds its state. rst_n is an
// active-low synchronous reset that clears the delay line and the output.
//
// From the document: 16 coefficients, 8-bit inputs and coefficients, 18-bit
// output, 10-bit check filter inputs. This design's own choices: signed
// arithmetic, direct form, truncation as the quantizer, coefficients given on
// a port, the enable and the reset.
module fir_filter #(
  parameter int unsigned TAPS   = ecc_pkg::TAPS_DEF,
  parameter int unsigned IN_W   = ecc_pkg::IN_W_DEF,
  parameter int unsigned COEF_W = ecc_pkg::COEF_W_DEF,
  parameter int unsigned OUT_W  = ecc_pkg::OUT_W_DEF
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic signed [IN_W-1:0]   x,
  input  logic signed [COEF_W-1:0] coef [TAPS],
  output logic signed [OUT_W-1:0]  y
);

  localparam int unsigned ACC_W = IN_W + COEF_W + $clog2(TAPS);
  localparam int unsigned SHIFT = ACC_W - OUT_W;

  // dly[l] holds x[n-1-l]
  logic signed [IN_W-1:0] dly [TAPS-1];
  logic signed [ACC_W-1:0] acc;

  always_comb begin
    acc = ACC_W'(x) * ACC_W'(coef[0]);
    for (int l = 1; l < TAPS; l++)
      acc += ACC_W'(dly[l-1]) * ACC_W'(coef[l]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int l = 0; l < TAPS - 1; l++) dly[l] <= '0;
      y <= '0;
    end else if (en) begin
      dly[0] <= x;
      for (int l = 1; l < TAPS - 1; l++) dly[l] <= dly[l-1];
      y <= OUT_W'(acc >>> SHIFT);
    end
  end

  initial begin
    assert (ACC_W >= OUT_W) else $error("fir_filter: OUT_W wider than the full-precision sum");
  end

endmodule
