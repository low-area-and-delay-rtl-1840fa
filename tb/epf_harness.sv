// epf_harness: drives one protected filter bank (ecc_parallel_fir with K data
// filters) with random coefficients and samples and checks it against a
// reference model, while injecting faults on single filter outputs.
//
// Reference: each channel's full-precision convolution, floored by the two
// bits the filters drop; a check filter's fault-free output is the floor of
// the sum of the full-precision results it covers. Every cycle one of three
// things happens: no fault; the output of data filter f is forced to a wrong
// value for that cycle; or the output of check filter c is. The corrected
// outputs must equal the fault-free data outputs, except a rebuilt output,
// which may exceed it by up to (filters in the check - 1) LSB. Flags, syndrome
// and out_valid latency are checked too.
//
// Counted mechanisms (each must occur): fault-free cycles, fault-free cycles
// where quantization left a non-zero mismatch below the threshold, a
// correction of each data filter, a detected fault in each check filter,
// idle (en low) cycles. Reports its counts on done.
module epf_harness #(
  parameter int K = 4,
  parameter int CYCLES = 2000
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int TAPS = 16;
  localparam int R = (K <= 4) ? 3 : 4;
  localparam int G = (K <= 4) ? 2 : 3;      // growth bits of a check word
  localparam int ZW = 18 + G;

  logic rst_n = 0, en = 0;
  logic signed [7:0]  x [K];
  logic signed [7:0]  coef [TAPS];
  logic out_valid;
  logic signed [17:0] yc [K];
  logic [R-1:0] syndrome;
  logic err_detect, err_data, err_check, err_uncorrectable;
  logic [$clog2(K)-1:0] err_index;

  ecc_parallel_fir #(.K(K)) dut (
    .clk, .rst_n, .en, .x, .coef, .out_valid, .yc, .syndrome, .err_detect,
    .err_data, .err_check, .err_uncorrectable, .err_index
  );

  // syndrome pattern of data filter i (s1 = MSB)
  function automatic int pat(int i);
    int p4 [4]   = '{7, 6, 5, 3};
    int p11 [11] = '{15, 14, 13, 12, 11, 10, 9, 7, 6, 5, 3};
    return (K == 4) ? p4[i] : p11[i];
  endfunction
  function automatic bit cov(int j, int i);
    return ((pat(i) >> (R - 1 - j)) & 1) != 0;
  endfunction

  longint hist [K][TAPS];
  longint full [K];
  longint yt [K], zt [R];
  int     inj_d = -1, inj_c = -1;   // filter forced this cycle
  longint fval;
  int n_clean = 0, n_sub = 0, n_idle = 0;
  int n_fix [K], n_chk [R];

  // fault injection: force the selected filter's output shortly after the
  // clock edge that updated it, release it before the next edge
  for (genvar i = 0; i < K; i++) begin : g_fd
    always @(posedge clk) begin
      if (inj_d == i) begin
        #1 force dut.y[i] = 18'(fval);
        #3 release dut.y[i];
      end
    end
  end
  for (genvar j = 0; j < R; j++) begin : g_fc
    always @(posedge clk) begin
      if (inj_c == j) begin
        #1 force dut.z[j] = ZW'(fval);
        #3 release dut.z[j];
      end
    end
  end

  function automatic longint offset();
    longint o = 64 + longint'($urandom % 20000);
    return ($urandom % 2) ? o : -o;
  endfunction

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL K=%0d: %s", K, msg);
  endtask

  initial begin
    bit e;
    int kind;
    longint s;
    done = 0; checks = 0; failures = 0;
    for (int i = 0; i < K; i++) begin
      n_fix[i] = 0; x[i] = 0; full[i] = 0; yt[i] = 0;
      for (int l = 0; l < TAPS; l++) hist[i][l] = 0;
    end
    for (int j = 0; j < R; j++) begin n_chk[j] = 0; zt[j] = 0; end
    for (int l = 0; l < TAPS; l++) coef[l] = 8'($urandom);
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < CYCLES; n++) begin
      @(negedge clk);
      // inputs for this cycle
      e = (n % 17 == 16) ? 0 : 1;
      en = e;
      for (int i = 0; i < K; i++) x[i] = 8'($urandom);
      if (n < 20) for (int i = 0; i < K; i++) x[i] = -8'sd128;   // large values first
      if (e) begin
        for (int i = 0; i < K; i++) begin
          for (int l = TAPS - 1; l > 0; l--) hist[i][l] = hist[i][l-1];
          hist[i][0] = longint'(x[i]);
          full[i] = 0;
          for (int l = 0; l < TAPS; l++) full[i] += hist[i][l] * longint'(coef[l]);
          yt[i] = full[i] >>> 2;
        end
        for (int j = 0; j < R; j++) begin
          s = 0;
          for (int i = 0; i < K; i++) if (cov(j, i)) s += full[i];
          zt[j] = s >>> 2;
        end
      end
      // choose the fault for the cycle after this edge (only when the edge
      // loads new outputs, so a released value is overwritten next time)
      inj_d = -1; inj_c = -1;
      kind = (e && n > 20) ? int'($urandom % 4) : 0;
      if (kind == 2) begin inj_d = int'($urandom % K); fval = yt[inj_d] + offset(); end
      if (kind == 3) begin inj_c = int'($urandom % R); fval = zt[inj_c] + offset(); end
      @(posedge clk);
      #2;
      checks++;
      if (out_valid !== e) fail($sformatf("out_valid=%b expected %b", out_valid, e));
      if (!e) n_idle++;
      if (inj_d >= 0) begin
        checks++;
        if (syndrome !== R'(pat(inj_d)) || !err_data || err_check || err_uncorrectable ||
            int'(err_index) != inj_d)
          fail($sformatf("data fault %0d: syndrome=%b data=%b idx=%0d", inj_d, syndrome, err_data, err_index));
        else n_fix[inj_d]++;
      end else if (inj_c >= 0) begin
        checks++;
        if (syndrome !== (R'(1) << (R - 1 - inj_c)) || err_data || !err_check || err_uncorrectable)
          fail($sformatf("check fault %0d: syndrome=%b", inj_c, syndrome));
        else n_chk[inj_c]++;
      end else begin
        checks++;
        if (syndrome !== '0 || err_detect) fail($sformatf("fault-free: syndrome=%b", syndrome));
        else begin
          n_clean++;
          for (int j = 0; j < R; j++) begin
            s = -zt[j];
            for (int i = 0; i < K; i++) if (cov(j, i)) s += yt[i];
            if (s != 0) begin n_sub++; break; end
          end
        end
      end
      for (int i = 0; i < K; i++) begin
        checks++;
        s = longint'(yc[i]) - yt[i];
        if ((i == inj_d) ? (s < 0 || s > longint'(K)) : (s != 0))
          fail($sformatf("yc[%0d]=%0d expected %0d (fault on data %0d, check %0d)", i, yc[i], yt[i], inj_d, inj_c));
      end
    end
    // every mechanism must have happened
    checks++; if (n_clean == 0) fail("no fault-free cycle");
    checks++; if (n_sub == 0)   fail("no sub-threshold mismatch");
    checks++; if (n_idle == 0)  fail("no idle cycle");
    for (int i = 0; i < K; i++) begin checks++; if (n_fix[i] == 0) fail($sformatf("filter %0d never corrected", i)); end
    for (int j = 0; j < R; j++) begin checks++; if (n_chk[j] == 0) fail($sformatf("check %0d never faulted", j)); end
    $display("K=%0d: fault-free %0d (sub-threshold mismatch %0d), idle %0d", K, n_clean, n_sub, n_idle);
    for (int i = 0; i < K; i++) $display("K=%0d: data filter %0d corrected %0d times", K, i + 1, n_fix[i]);
    for (int j = 0; j < R; j++) $display("K=%0d: check filter %0d fault detected %0d times", K, j + 1, n_chk[j]);
    done = 1;
  end
endmodule
