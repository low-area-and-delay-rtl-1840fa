// tb_decoder_3x8: every input value must raise exactly its own output line.
module tb_decoder_3x8;
  int checks = 0, failures = 0;
  logic [2:0] s;
  logic [7:0] e;

  decoder_3x8 dut (.s, .e);

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      s = 3'(v);
      #1;
      checks++;
      if (e !== (8'd1 << v)) begin
        failures++;
        $display("FAIL s=%0d e=%b", v, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
