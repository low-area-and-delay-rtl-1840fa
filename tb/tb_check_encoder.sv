// tb_check_encoder: random inputs. For K=4 the check inputs must be
// x5 = x1+x2+x3, x6 = x1+x2+x4, x7 = x1+x3+x4 (10 bits). For K=11 each
// check sums the data inputs whose syndrome pattern has that bit set; the
// patterns are the 4-bit values of weight >= 2 from 1111 downward.
module tb_check_encoder;
  int checks = 0, failures = 0;
  logic signed [7:0]  x4  [4];
  logic signed [9:0]  xc4 [3];
  logic signed [7:0]  x11 [11];
  logic signed [10:0] xc11 [4];
  localparam int PAT11 [11] = '{15, 14, 13, 12, 11, 10, 9, 7, 6, 5, 3};

  check_encoder dut4 (.x(x4), .xc(xc4));
  check_encoder #(.K(11)) dut11 (.x(x11), .xc(xc11));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    for (int n = 0; n < 1000; n++) begin
      for (int i = 0; i < 4; i++)  x4[i]  = (n == 0) ? -8'sd128 : 8'($urandom);
      for (int i = 0; i < 11; i++) x11[i] = (n == 0) ? -8'sd128 : 8'($urandom);
      #1;
      checks += 3;
      if (int'(xc4[0]) != x4[0] + x4[1] + x4[2]) begin failures++; $display("FAIL x5"); end
      if (int'(xc4[1]) != x4[0] + x4[1] + x4[3]) begin failures++; $display("FAIL x6"); end
      if (int'(xc4[2]) != x4[0] + x4[2] + x4[3]) begin failures++; $display("FAIL x7"); end
      for (int j = 0; j < 4; j++) begin
        e = 0;
        for (int i = 0; i < 11; i++) if ((PAT11[i] >> (3 - j)) & 1) e += x11[i];
        checks++;
        if (int'(xc11[j]) != e) begin failures++; $display("FAIL K=11 check %0d: %0d expected %0d", j, xc11[j], e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
