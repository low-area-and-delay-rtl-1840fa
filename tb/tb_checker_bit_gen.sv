// tb_checker_bit_gen: all 128 received words against s = y * H^T with
// H rows 1110100, 1101010, 1011001.
module tb_checker_bit_gen;
  int checks = 0, failures = 0;
  logic [6:0] y;
  logic [2:0] s, exp_s;
  localparam logic [6:0] H [3] = '{7'b1110100, 7'b1101010, 7'b1011001};

  checker_bit_gen dut (.y, .s);

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 128; v++) begin
      y = 7'(v);
      for (int j = 0; j < 3; j++) exp_s[2-j] = ^(y & H[j]);
      #1;
      checks++;
      if (s !== exp_s) begin
        failures++;
        $display("FAIL y=%b s=%b expected %b", y, s, exp_s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
