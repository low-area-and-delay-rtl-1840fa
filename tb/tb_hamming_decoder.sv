// tb_hamming_decoder: every data word, encoded with the generator matrix,
// with no error and with each of the seven single-bit errors. The decoder
// must return the data word, and the syndrome must name the flipped bit as in
// the syndrome table.
module tb_hamming_decoder;
  int checks = 0, failures = 0;
  logic [6:0] y, yc, cw;
  logic [3:0] d;
  logic [2:0] s;
  logic err;
  localparam logic [6:0] G [4] = '{7'b1000111, 7'b0100110, 7'b0010101, 7'b0001011};
  // syndrome for an error in y[b]: p3, p2, p1, d4, d3, d2, d1
  localparam logic [2:0] SYN [7] = '{3'b001, 3'b010, 3'b100, 3'b011, 3'b101, 3'b110, 3'b111};

  hamming_decoder dut (.y, .d, .yc, .s, .err);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      cw = '0;
      for (int i = 0; i < 4; i++) if (v[i]) cw ^= G[i];
      for (int b = -1; b < 7; b++) begin
        y = (b < 0) ? cw : cw ^ (7'd1 << b);
        #1;
        checks++;
        if (d !== 4'(v) || yc !== cw) begin
          failures++;
          $display("FAIL data=%b error bit %0d: d=%b yc=%b", 4'(v), b, d, yc);
        end
        checks++;
        if (s !== ((b < 0) ? 3'b000 : SYN[b]) || err !== (b >= 0)) begin
          failures++;
          $display("FAIL data=%b error bit %0d: s=%b err=%b", 4'(v), b, s, err);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
