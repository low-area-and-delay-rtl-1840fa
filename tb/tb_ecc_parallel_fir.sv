// tb_ecc_parallel_fir: the protected filter bank in both configurations,
// four data filters with three check filters (Hamming (7,4)) and eleven
// data filters with four check filters (Hamming (15,11)), each driven by
// epf_harness with random data and single-filter fault injection.
module tb_ecc_parallel_fir;
  logic clk = 0;
  logic done4, done11;
  int c4, f4, c11, f11;

  always #5 clk = ~clk;

  epf_harness #(.K(4))  h4  (.clk, .done(done4),  .checks(c4),  .failures(f4));
  epf_harness #(.K(11)) h11 (.clk, .done(done11), .checks(c11), .failures(f11));

  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c4 + c11, f4 + f11 + 1);
    $finish;
  end

  initial begin
    wait (done4 && done11);
    $display("TB_RESULT checks=%0d failures=%0d", c4 + c11, f4 + f11);
    $finish;
  end
endmodule
