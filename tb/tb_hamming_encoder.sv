// tb_hamming_encoder: all 16 data words against the generator matrix
// (rows d1 = 1000111, d2 = 0100110, d3 = 0010101, d4 = 0001011).
module tb_hamming_encoder;
  int checks = 0, failures = 0;
  logic [3:0] d;
  logic [6:0] y, exp_y;
  localparam logic [6:0] G [4] = '{7'b1000111, 7'b0100110, 7'b0010101, 7'b0001011};

  hamming_encoder dut (.d, .y);

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      d = 4'(v);
      exp_y = '0;
      for (int i = 0; i < 4; i++) if (d[i]) exp_y ^= G[i];   // d[i] is d(i+1)
      #1;
      checks++;
      if (y !== exp_y) begin
        failures++;
        $display("FAIL d=%b y=%b expected %b", d, y, exp_y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
