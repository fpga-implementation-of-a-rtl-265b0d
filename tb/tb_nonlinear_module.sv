// tb_nonlinear_module: loads seed1 with start, feeds the next state back as
// Z_{t+1} (and sometimes a random perturbed value), and checks the state
// register and the logistic-map output against the integer reference.
module tb_nonlinear_module;
  import tb_ref_pkg::*;

  logic        clk = 0, rst_n = 0, start = 0, step = 0;
  logic [31:0] seed1 = '0, z_next = '0, x_cur, x_next, ref_x;
  int checks = 0, failures = 0;

  nonlinear_module #(.W(32)) dut (.clk, .rst_n, .start, .seed1, .step, .z_next, .x_cur, .x_next);

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
    for (int run = 0; run < 3; run++) begin
      @(negedge clk); start = 1; seed1 = $urandom; ref_x = seed1;
      @(negedge clk); start = 0;
      for (int n = 0; n < 1000; n++) begin
        checks += 2;
        if (x_cur !== ref_x) begin failures++; $display("FAIL state n %0d %h exp %h", n, x_cur, ref_x); end
        if (x_next !== lgm(ref_x)) begin failures++; $display("FAIL next n %0d", n); end
        z_next = ($urandom_range(9, 0) == 0) ? $urandom : x_next;
        step   = ($urandom_range(4, 0) != 0);
        @(negedge clk);
        if (step) ref_x = z_next;
        step = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
