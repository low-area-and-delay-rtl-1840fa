// tb_decode: every received word with every syndrome line; the flipped bit
// must be the one the syndrome table names (111 d1, 110 d2, 101 d3, 011 d4,
// 100 p1, 010 p2, 001 p3, 000 none).
module tb_decode;
  int checks = 0, failures = 0;
  logic [6:0] y, yc, exp_yc;
  logic [7:0] e;
  logic [3:0] d, exp_d;

  decode dut (.y, .e, .yc, .d);

  function automatic logic [6:0] flip_mask(int sv);
    case (sv)
      7: return 7'b1000000;   // d1
      6: return 7'b0100000;   // d2
      5: return 7'b0010000;   // d3
      3: return 7'b0001000;   // d4
      4: return 7'b0000100;   // p1
      2: return 7'b0000010;   // p2
      1: return 7'b0000001;   // p3
      default: return 7'b0;
    endcase
  endfunction

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 128; v++) begin
      for (int sv = 0; sv < 8; sv++) begin
        y = 7'(v);
        e = 8'd1 << sv;
        exp_yc = y ^ flip_mask(sv);
        exp_d  = {exp_yc[3], exp_yc[4], exp_yc[5], exp_yc[6]};
        #1;
        checks++;
        if (yc !== exp_yc || d !== exp_d) begin
          failures++;
          $display("FAIL y=%b syndrome=%0d yc=%b d=%b", y, sv, yc, d);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
