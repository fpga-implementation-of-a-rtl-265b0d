// tb_cls: checks the two circular shifters of the DX generator: rotating by
// n must equal multiplying by 2^n modulo 2^31 - 1, and must keep the number
// of ones.
module tb_cls;
  import tb_ref_pkg::*;

  logic [30:0] a, y28, y8;
  int checks = 0, failures = 0;

  cls #(.W(31), .SHIFT(28)) dut28 (.a, .y(y28));
  cls #(.W(31), .SHIFT(8))  dut8  (.a, .y(y8));

  task automatic check(input logic [30:0] v);
    longint unsigned e28, e8;
    a = v;
    #1;
    e28 = mod_m(64'(v) << 28);
    e8  = mod_m(64'(v) << 8);
    checks += 3;
    if (mod_m(64'(y28)) != e28) begin failures++; $display("FAIL cls28 %h -> %h", v, y28); end
    if (mod_m(64'(y8))  != e8)  begin failures++; $display("FAIL cls8 %h -> %h", v, y8); end
    if ($countones(y28) != $countones(v) || $countones(y8) != $countones(v)) begin
      failures++; $display("FAIL ones %h", v);
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
    check(31'h1);
    check(31'h4000_0000);
    check(31'h0000_0008);
    for (int i = 0; i < 1000; i++) check(31'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
