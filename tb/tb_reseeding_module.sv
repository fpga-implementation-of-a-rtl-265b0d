// tb_reseeding_module: drives state pairs (X_t, X_{t+1}) into the reseeding
// module with a short period T_R = 7 and checks the fixed-point flag, the
// period flag, the counter restart after either cause and the replacement of
// exactly the 5 LSBs by the pattern R.
module tb_reseeding_module;

  localparam int unsigned TR = 7;
  localparam logic [4:0]  R  = 5'b01101;

  logic        clk = 0, rst_n = 0, start = 0, step = 0;
  logic [31:0] x_cur = '0, x_next = '0, z_next;
  logic        reseed, hit_fixed, hit_period;
  int unsigned ref_rc;
  int checks = 0, failures = 0, n_fixed = 0, n_period = 0;

  reseeding_module #(.W(32), .L(5), .TR(TR), .R(R)) dut (
    .clk, .rst_n, .start, .step, .x_cur, .x_next, .z_next, .reseed, .hit_fixed, .hit_period
  );

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
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    ref_rc = 0;
    for (int n = 0; n < 3000; n++) begin
      bit ef, ep;
      x_cur  = $urandom;
      x_next = ($urandom_range(9, 0) == 0) ? x_cur : $urandom;
      #1;
      ef = (x_cur == x_next);
      ep = (ref_rc == TR - 1);
      checks += 4;
      if (hit_fixed !== ef)  begin failures++; $display("FAIL fixed n %0d", n); end
      if (hit_period !== ep) begin failures++; $display("FAIL period n %0d rc %0d", n, ref_rc); end
      if (reseed !== (ef | ep)) begin failures++; $display("FAIL reseed n %0d", n); end
      if (z_next !== ((ef | ep) ? {x_next[31:5], R} : x_next)) begin
        failures++; $display("FAIL z n %0d x %h z %h", n, x_next, z_next);
      end
      step = ($urandom_range(5, 0) != 0);
      if (step && ef) n_fixed++;
      if (step && ep) n_period++;
      @(negedge clk);
      if (step) ref_rc = (ef | ep) ? 0 : ref_rc + 1;
      step = 0;
      if (n == 1500) begin
        start = 1; @(negedge clk); start = 0; ref_rc = 0;
      end
    end
    checks += 2;
    if (n_fixed == 0)  begin failures++; $display("FAIL no fixed point reseed"); end
    if (n_period == 0) begin failures++; $display("FAIL no period reseed"); end
    $display("reseeds: fixed %0d period %0d", n_fixed, n_period);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
