// tb_fault_corrector: random full-precision filter results a_i are quantized
// the way the filters do it (floor of a/4): y_i from each a_i, z_j from the
// sum of the a_i a check covers, so the checks carry the genuine small
// quantization mismatch. Then: no fault, a fault on each data output, a fault
// on each check output. A second instance with K=5 (a shortened code, where
// some syndromes belong to no single fault) checks the uncorrectable flag. Faults are offsets of at
// least 16 LSB, well above the threshold. A rebuilt output may differ from
// the fault-free one by at most (number of outputs in the check - 1) LSB.
module tb_fault_corrector;
  localparam int K = 4, R = 3;
  int checks = 0, failures = 0;
  int n_sub_threshold = 0;
  logic signed [17:0] y [K], yc [K];
  logic signed [19:0] z [R];
  logic [R-1:0] syndrome;
  logic err_detect, err_data, err_check, err_uncorrectable;
  logic [1:0] err_index;
  int a [K], yt [K], zt [R];
  // coverage of check j (s1..s3) over data 1..4, written out from the equations
  localparam bit COV [R][K] = '{'{1, 1, 1, 0}, '{1, 1, 0, 1}, '{1, 0, 1, 1}};
  localparam logic [2:0] PAT [K] = '{3'b111, 3'b110, 3'b101, 3'b011};

  // K=5: four checks, patterns 1111 1110 1101 1100 1011
  logic signed [17:0] y5 [5], yc5 [5];
  logic signed [20:0] z5 [4];
  logic [3:0] syn5;
  logic det5, dat5, chk5, unc5;
  logic [2:0] idx5;
  fault_corrector #(.K(5)) dut5 (.y(y5), .z(z5), .yc(yc5), .syndrome(syn5), .err_detect(det5),
                                 .err_data(dat5), .err_check(chk5), .err_uncorrectable(unc5),
                                 .err_index(idx5));

  fault_corrector dut (.y, .z, .yc, .syndrome, .err_detect, .err_data, .err_check,
                       .err_uncorrectable, .err_index);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int offset();
    int o = 16 + int'($urandom % 20000);
    return ($urandom % 2) ? o : -o;
  endfunction

  task automatic make_values();
    int s;
    for (int i = 0; i < K; i++) begin
      a[i] = int'($urandom % 400000) - 200000;
      yt[i] = a[i] >>> 2;
    end
    for (int j = 0; j < R; j++) begin
      s = 0;
      for (int i = 0; i < K; i++) if (COV[j][i]) s += a[i];
      zt[j] = s >>> 2;
    end
    for (int i = 0; i < K; i++) y[i] = 18'(yt[i]);
    for (int j = 0; j < R; j++) z[j] = 20'(zt[j]);
  endtask

  task automatic expect_out(string what, logic [2:0] syn, bit det, bit dat, bit chk, bit unc,
                            int idx, int tol_i);
    #1;
    checks++;
    if (syndrome !== syn || err_detect !== det || err_data !== dat || err_check !== chk ||
        err_uncorrectable !== unc || (dat && err_index != 2'(idx))) begin
      failures++;
      $display("FAIL %s: syndrome=%b det=%b data=%b check=%b unc=%b idx=%0d", what, syndrome,
               err_detect, err_data, err_check, err_uncorrectable, err_index);
    end
    for (int i = 0; i < K; i++) begin
      int d = int'(yc[i]) - ((i == tol_i) ? yt[i] : int'(y[i]));
      checks++;
      if ((i == tol_i) ? (d < 0 || d > 2) : (d != 0)) begin
        failures++;
        $display("FAIL %s: yc[%0d]=%0d fault-free %0d", what, i, yc[i], yt[i]);
      end
    end
  endtask

  initial begin
    int s;
    for (int n = 0; n < 3000; n++) begin
      make_values();
      expect_out("no fault", 3'b000, 0, 0, 0, 0, 0, -1);
      for (int j = 0; j < R; j++) begin
        s = -zt[j];
        for (int i = 0; i < K; i++) if (COV[j][i]) s += yt[i];
        if (s != 0) n_sub_threshold++;
      end
      for (int i = 0; i < K; i++) begin
        make_values();
        y[i] = 18'(yt[i] + offset());
        expect_out("data fault", PAT[i], 1, 1, 0, 0, i, i);
      end
      for (int j = 0; j < R; j++) begin
        make_values();
        z[j] = 20'(zt[j] + offset());
        expect_out("check fault", 3'b100 >> j, 1, 0, 1, 0, 0, -1);
      end
    end
    // shortened code: two check faults give 0011, which names no single fault
    for (int i = 0; i < 5; i++) y5[i] = 18'(1000 * i);
    z5[0] = 21'(0 + 1000 + 2000 + 3000 + 4000);   // 1111 1110 1101 1100 1011 -> s1 covers all
    z5[1] = 21'(0 + 1000 + 2000 + 3000);          // s2: 1111 1110 1101 1100
    z5[2] = 21'(0 + 1000 + 4000);                 // s3: 1111 1110 1011
    z5[3] = 21'(0 + 2000 + 4000);                 // s4: 1111 1101 1011
    #1;
    checks++;
    if (syn5 !== 4'b0000 || det5 || unc5) begin failures++; $display("FAIL K=5 fault-free syndrome %b", syn5); end
    z5[2] = z5[2] + 21'sd500;
    z5[3] = z5[3] - 21'sd500;
    #1;
    checks++;
    if (syn5 !== 4'b0011 || !det5 || dat5 || chk5 || !unc5) begin
      failures++; $display("FAIL K=5 double check fault: syndrome %b unc=%b", syn5, unc5);
    end
    for (int i = 0; i < 5; i++) begin
      checks++;
      if (yc5[i] !== y5[i]) begin failures++; $display("FAIL K=5 output %0d changed", i); end
    end
    checks++;
    if (n_sub_threshold == 0) begin failures++; $display("FAIL no sub-threshold mismatch seen"); end
    $display("sub-threshold mismatches absorbed: %0d", n_sub_threshold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
