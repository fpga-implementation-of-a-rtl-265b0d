// tb_lgm_next_state: checks the logistic-map next-state function against an
// integer reference on corner values (0, 1, 0.25, 0.5, 0.75, all ones) and
// on random states.
module tb_lgm_next_state;
  import tb_ref_pkg::*;

  logic [31:0] x, xn;
  int checks = 0, failures = 0;

  lgm_next_state #(.W(32)) dut (.x, .x_next(xn));

  task automatic check(input logic [31:0] v);
    x = v;
    #1;
    checks++;
    if (xn !== lgm(v)) begin
      failures++;
      $display("FAIL x=%h got %h exp %h", v, xn, lgm(v));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'h0000_0000);
    check(32'h0000_0001);
    check(32'h4000_0000);
    check(32'h8000_0000);
    check(32'hC000_0000);
    check(32'hFFFF_FFFF);
    // 0.25 -> 0.75 and 0.75 -> 0.75 - 3/2^30 in this fixed-point form
    x = 32'h4000_0000; #1; checks++;
    if (xn !== 32'hC000_0000) begin failures++; $display("FAIL 0.25 -> %h", xn); end
    // symmetry: F(X) == F(1 - X)
    for (int i = 0; i < 200; i++) begin
      logic [31:0] v, a;
      v = $urandom; x = v; #1; a = xn;
      x = -v; #1; checks++;
      if (a !== xn) begin failures++; $display("FAIL symmetry %h", v); end
    end
    for (int i = 0; i < 2000; i++) check($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
