// tb_rm_prng: runs the complete RM-PRNG at its default reseeding period
// against a software model of the generator (logistic map, reseeding by
// fixed point and by period, DX-8 mixing). Every key word is compared; the
// reseeding flags are compared with the model's; both reseeding causes must
// occur. A stretch with next held high checks the rate of one word per clock,
// and next pulses before start must be ignored.
module tb_rm_prng;
  import tb_ref_pkg::*;
  import rm_prng_pkg::*;

  logic        clk = 0, rst_n = 0, start = 0, next = 0;
  logic [31:0] seed1 = '0, key;
  logic [30:0] seed2 = '0;
  logic        key_valid, reseed, hit_fixed, hit_period;
  rm_prng_ref  mdl;
  int checks = 0, failures = 0, n_fixed = 0, n_period = 0, n_stall = 0;

  rm_prng dut (.clk, .rst_n, .start, .seed1, .seed2, .next, .key, .key_valid,
               .reseed, .hit_fixed, .hit_period);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [31:0] s1, input logic [30:0] s2, input int n, input int stall_pct);
    @(negedge clk); start = 1; seed1 = s1; seed2 = s2; next = 1;
    @(negedge clk); start = 0;
    mdl.start(s1, s2);
    for (int i = 0; i < n; i++) begin
      bit ef, ep;
      logic [31:0] ek;
      ek = mdl.key();
      checks += 3;
      if (!key_valid) begin failures++; $display("FAIL key_valid low"); end
      if (key !== ek) begin failures++; $display("FAIL word %0d key %h exp %h", i, key, ek); end
      next = ($urandom_range(99, 0) >= stall_pct);
      if (!next) n_stall++;
      #1;
      if (next) begin
        mdl.step(ef, ep);
        if (hit_fixed !== ef || hit_period !== ep) begin
          failures++; $display("FAIL flags word %0d fixed %0d/%0d period %0d/%0d", i, hit_fixed, ef, hit_period, ep);
        end
        if (ef) n_fixed++;
        if (ep) n_period++;
      end
      @(negedge clk);
    end
    next = 0;
  endtask

  initial begin
    mdl = new(RS_TR, RS_R);
    repeat (2) @(posedge clk);
    rst_n <= 1;
    // before start: no key, next has no effect
    @(negedge clk); next = 1;
    repeat (3) @(negedge clk);
    checks++;
    if (key_valid) begin failures++; $display("FAIL key_valid before start"); end
    next = 0;
    // seed1 = 0 is a fixed point of the map: reseeding must move it away
    run(32'h0000_0000, 31'h0000_0001, 200, 0);
    // full rate, then random stalls; long enough to pass the period twice
    run(32'h1357_9BDF, 31'h2468_ACE0, 2500, 0);
    run($urandom, 31'($urandom_range(32'h7FFF_FFFE, 1)), 3000, 20);
    checks += 3;
    if (n_fixed == 0)  begin failures++; $display("FAIL no fixed-point reseed"); end
    if (n_period == 0) begin failures++; $display("FAIL no period reseed"); end
    if (n_stall == 0)  begin failures++; $display("FAIL no stall"); end
    $display("reseeds: fixed %0d period %0d, stalls %0d", n_fixed, n_period, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
