// tb_decryptor: presents random words and keys with random gaps and checks that
// each result is the input XOR the key, one cycle later, that out_valid
// follows in_valid by exactly one cycle, and that the output holds while
// no word arrives.
module tb_decryptor;

  logic        clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [31:0] cipher = '0, key = '0, plain;
  logic [31:0] exp_q;
  logic        exp_v;
  int checks = 0, failures = 0;

  decryptor dut (.clk, .rst_n, .in_valid, .cipher, .key, .out_valid, .plain);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    exp_v = 0; exp_q = '0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      checks += 2;
      if (out_valid !== exp_v) begin failures++; $display("FAIL valid n %0d", n); end
      if (plain !== exp_q) begin failures++; $display("FAIL data n %0d got %h exp %h", n, plain, exp_q); end
      in_valid = ($urandom_range(3, 0) != 0);
      cipher = $urandom;
      key = $urandom;
      exp_v = in_valid;
      if (in_valid) exp_q = cipher ^ key;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
