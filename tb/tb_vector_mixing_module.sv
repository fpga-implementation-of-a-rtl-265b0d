// tb_vector_mixing_module: drives random chaotic states into the vector
// mixing module, steps it, and checks each output word against
// {X[31], X[30:0] ^ Y_{t+1}} with Y from an independent DX-8 model.
module tb_vector_mixing_module;
  import tb_ref_pkg::*;

  logic        clk = 0, rst_n = 0, start = 0, step = 0;
  logic [30:0] seed2 = '0, y_next;
  logic [31:0] x_next = '0, o;
  logic [30:0] ref_y [8];
  int checks = 0, failures = 0;

  vector_mixing_module dut (.clk, .rst_n, .start, .seed2, .step, .x_next, .y_next, .out(o));

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
    @(negedge clk); start = 1; seed2 = 31'h1234_5678;
    @(negedge clk); start = 0;
    foreach (ref_y[i]) ref_y[i] = 31'h1234_5678;
    for (int n = 0; n < 3000; n++) begin
      logic [30:0] e;
      x_next = $urandom;
      #1;
      e = dx_next(ref_y[0], ref_y[7]);
      checks++;
      if (o !== {x_next[31], x_next[30:0] ^ e}) begin
        failures++; $display("FAIL n %0d x %h got %h exp y %h", n, x_next, o, e);
      end
      step = ($urandom_range(4, 0) != 0);
      @(negedge clk);
      if (step) begin
        for (int i = 7; i > 0; i--) ref_y[i] = ref_y[i-1];
        ref_y[0] = e;
      end
      step = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
