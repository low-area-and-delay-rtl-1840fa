// tb_fir_filter: random coefficients and samples, checked against a
// reference convolution computed at full precision and truncated (floor) by
// the number of dropped bits. Two instances: a data filter (8-bit in,
// 18-bit out) and a check filter (10-bit in, 20-bit out). Every cycle the
// output must equal y[n] for the sample taken on the previous enabled cycle
// (one cycle of latency) and must hold while en is low. Includes an all
// most-negative run, which produces the largest magnitude output.
module tb_fir_filter;
  localparam int TAPS = 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  logic signed [7:0]  xa;
  logic signed [9:0]  xb;
  logic signed [7:0]  coef [TAPS];
  logic signed [17:0] ya;
  logic signed [19:0] yb;
  longint ha [TAPS], hb [TAPS];
  longint expa, expb;

  always #5 clk = ~clk;

  fir_filter dut_a (.clk, .rst_n, .en, .x(xa), .coef, .y(ya));
  fir_filter #(.IN_W(10), .OUT_W(20)) dut_b (.clk, .rst_n, .en, .x(xb), .coef, .y(yb));

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint conv(longint h [TAPS]);
    longint acc = 0;
    for (int l = 0; l < TAPS; l++) acc += h[l] * longint'(coef[l]);
    return acc >>> 2;     // 20-bit (22-bit) sum quantized to 18 (20) bits
  endfunction

  task automatic step(bit e, longint va, longint vb);
    @(negedge clk);
    en = e; xa = 8'(va); xb = 10'(vb);
    if (e) begin
      for (int l = TAPS - 1; l > 0; l--) begin ha[l] = ha[l-1]; hb[l] = hb[l-1]; end
      ha[0] = va; hb[0] = vb;
      expa = conv(ha); expb = conv(hb);
    end
    @(posedge clk); #1;
    checks += 2;
    if (longint'(ya) != expa) begin failures++; $display("FAIL data filter y=%0d expected %0d", ya, expa); end
    if (longint'(yb) != expb) begin failures++; $display("FAIL check filter y=%0d expected %0d", yb, expb); end
  endtask

  initial begin
    for (int l = 0; l < TAPS; l++) begin ha[l] = 0; hb[l] = 0; coef[l] = 8'($urandom); end
    expa = 0; expb = 0; xa = 0; xb = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(posedge clk); #1;
    checks++;
    if (ya != 0 || yb != 0) begin failures++; $display("FAIL output not cleared by reset"); end
    for (int n = 0; n < 2000; n++)
      step(($urandom % 4) != 0, longint'($signed(8'($urandom))), longint'($signed(10'($urandom))));
    // largest magnitudes
    for (int l = 0; l < TAPS; l++) coef[l] = -8'sd128;
    for (int n = 0; n < TAPS + 2; n++) step(1, -128, -512);
    for (int l = 0; l < TAPS; l++) coef[l] = 8'sd127;
    for (int n = 0; n < TAPS + 2; n++) step(1, -128, 511);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
