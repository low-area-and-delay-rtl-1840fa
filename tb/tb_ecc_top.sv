// tb_ecc_top: end-to-end test of the whole design at its default sizes.
//
// Protected filter bank (four 16-tap filters, three check filters): random
// coefficients and samples, checked against a reference convolution, with a
// fault forced on one data or check filter output in about half of the
// cycles. Counted mechanisms, each required at least once: fault-free
// cycles, quantization mismatch below the threshold, correction of each data
// filter, detection of a fault in each check filter, idle cycles (en low).
// Hamming (7,4) codec: every data word, without error and with every
// single-bit error; counted: clean words and correction of each bit position.
module tb_ecc_top;
  localparam int K = 4;                     // data filters at the default size
  localparam int TAPS = 16;
  localparam int R = 3;                     // check filters
  localparam int ZW = 20;                   // check filter output width

  int checks = 0, failures = 0;
  logic clk = 0, done = 0, hdone = 0;
  logic rst_n = 0, en = 0;
  logic signed [7:0]  x [K];
  logic signed [7:0]  coef [TAPS];
  logic out_valid;
  logic signed [17:0] yc [K];
  logic [R-1:0] syndrome;
  logic err_detect, err_data, err_check, err_uncorrectable;
  logic [$clog2(K)-1:0] err_index;

  logic [3:0] h_data_in, h_data_out;
  logic [6:0] h_codeword_out, h_codeword_in;
  logic [2:0] h_syndrome;
  logic h_err;

  always #5 clk = ~clk;

  ecc_top dut (
    .clk, .rst_n, .f_en(en), .f_x(x), .f_coef(coef), .f_out_valid(out_valid), .f_y(yc),
    .f_syndrome(syndrome), .f_err_detect(err_detect), .f_err_data(err_data),
    .f_err_check(err_check), .f_err_uncorrectable(err_uncorrectable), .f_err_index(err_index),
    .h_data_in, .h_codeword_out, .h_codeword_in, .h_data_out, .h_syndrome, .h_err
  );

  // syndrome pattern of data filter i (s1 = MSB)
  function automatic int pat(int i);
    int p4 [4] = '{7, 6, 5, 3};
    return p4[i];
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
        #1 force dut.u_bank.y[i] = 18'(fval);
        #3 release dut.u_bank.y[i];
      end
    end
  end
  for (genvar j = 0; j < R; j++) begin : g_fc
    always @(posedge clk) begin
      if (inj_c == j) begin
        #1 force dut.u_bank.z[j] = ZW'(fval);
        #3 release dut.u_bank.z[j];
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

  // Hamming (7,4) codec: every data word is encoded; the codeword is sent to
  // the decoder unchanged and with each single-bit error in turn. Reference
  // codewords come from the generator matrix, reference syndromes from the
  // syndrome table.
  localparam logic [6:0] GM [4] = '{7'b1000111, 7'b0100110, 7'b0010101, 7'b0001011};
  localparam logic [2:0] SYN [7] = '{3'b001, 3'b010, 3'b100, 3'b011, 3'b101, 3'b110, 3'b111};
  int n_hclean = 0, n_hfix [7];
  initial begin
    logic [6:0] cw;
    for (int b = 0; b < 7; b++) n_hfix[b] = 0;
    h_data_in = 0; h_codeword_in = 0;
    #3;
    for (int v = 0; v < 16; v++) begin
      h_data_in = 4'(v);
      cw = '0;
      for (int i = 0; i < 4; i++) if (v[i]) cw ^= GM[i];
      #1;
      checks++;
      if (h_codeword_out !== cw) begin
        failures++; $display("FAIL encoder: data %b codeword %b expected %b", h_data_in, h_codeword_out, cw);
      end
      for (int b = -1; b < 7; b++) begin
        h_codeword_in = (b < 0) ? h_codeword_out : h_codeword_out ^ (7'd1 << b);
        #1;
        checks++;
        if (h_data_out !== 4'(v) || h_err !== (b >= 0) || h_syndrome !== ((b < 0) ? 3'b000 : SYN[b])) begin
          failures++;
          $display("FAIL decoder: data %b error bit %0d -> %b syndrome %b", 4'(v), b, h_data_out, h_syndrome);
        end else if (b < 0) n_hclean++;
        else n_hfix[b]++;
      end
    end
    checks++;
    if (n_hclean == 0) begin failures++; $display("FAIL codec: no clean word"); end
    for (int b = 0; b < 7; b++) begin
      checks++;
      if (n_hfix[b] == 0) begin failures++; $display("FAIL codec: bit y%0d never corrected", 7 - b); end
    end
    $display("codec: %0d clean words, each of the 7 bit positions corrected %0d times", n_hclean, n_hfix[0]);
    hdone = 1;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (done && hdone);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit e;
    int kind;
    longint s;
    for (int i = 0; i < K; i++) begin
      n_fix[i] = 0; x[i] = 0; full[i] = 0; yt[i] = 0;
      for (int l = 0; l < TAPS; l++) hist[i][l] = 0;
    end
    for (int j = 0; j < R; j++) begin n_chk[j] = 0; zt[j] = 0; end
    for (int l = 0; l < TAPS; l++) coef[l] = 8'($urandom);
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
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
