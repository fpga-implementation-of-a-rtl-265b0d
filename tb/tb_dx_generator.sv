// tb_dx_generator: starts the DX-8 generator from several seeds, steps it
// with random gaps and compares every new word with the recurrence
// Y_{t+1} = Y_t + (2^28 + 2^8) Y_{t-7} mod 2^31 - 1 computed here. Also
// checks that a stall holds the words and that one word comes per step.
module tb_dx_generator;
  import tb_ref_pkg::*;

  logic        clk = 0, rst_n = 0, start = 0, step = 0;
  logic [30:0] seed2 = '0, y_next, y_cur;
  logic [30:0] ref_y [8];
  int checks = 0, failures = 0, stalls = 0;

  dx_generator dut (.clk, .rst_n, .start, .seed2, .step, .y_next, .y_cur);

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
    for (int run = 0; run < 4; run++) begin
      logic [30:0] s;
      s = (run == 0) ? 31'h0000_0001 : 31'($urandom_range(32'h7FFF_FFFE, 1));
      @(negedge clk); start = 1; seed2 = s;
      @(negedge clk); start = 0;
      foreach (ref_y[i]) ref_y[i] = s;
      for (int n = 0; n < 1000; n++) begin
        logic [30:0] e;
        e = dx_next(ref_y[0], ref_y[7]);
        checks += 2;
        if (mod_m(64'(y_next)) != 64'(e)) begin
          failures++; $display("FAIL run %0d n %0d got %h exp %h", run, n, y_next, e);
        end
        if (mod_m(64'(y_cur)) != mod_m(64'(ref_y[0]))) begin
          failures++; $display("FAIL y_cur run %0d n %0d", run, n);
        end
        step = ($urandom_range(3, 0) != 0);
        if (!step) stalls++;
        @(negedge clk);
        if (step) begin
          for (int i = 7; i > 0; i--) ref_y[i] = ref_y[i-1];
          ref_y[0] = e;
        end
        step = 0;
      end
    end
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL no stall exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
