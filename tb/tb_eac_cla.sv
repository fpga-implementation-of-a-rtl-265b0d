// tb_eac_cla: checks the 31-bit end-around-carry adder bit-exactly: the
// result is a + b when that is below 2^31, and a + b - 2^31 + 1 otherwise;
// eac is the carry out of bit 30. Includes operands that make a carry run
// through every group boundary.
module tb_eac_cla;

  logic [30:0] a, b, s;
  logic        eac;
  int checks = 0, failures = 0;

  eac_cla dut (.a, .b, .s, .eac);

  task automatic check(input logic [30:0] va, vb);
    longint unsigned t, e;
    a = va; b = vb;
    #1;
    t = 64'(va) + 64'(vb);
    e = (t >= 64'h8000_0000) ? t - 64'h8000_0000 + 1 : t;
    checks += 2;
    if (64'(s) != e) begin failures++; $display("FAIL %h + %h -> %h exp %h", va, vb, s, e); end
    if (eac != (t >= 64'h8000_0000)) begin failures++; $display("FAIL eac %h + %h", va, vb); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(31'h0, 31'h0);
    check(31'h7FFF_FFFF, 31'h1);        // carry from the top wraps, ripples up
    check(31'h7FFF_FFFF, 31'h0);        // all propagate, no generate
    check(31'h4000_0000, 31'h4000_0000);
    check(31'h0000_007F, 31'h0000_0001);
    check(31'h0000_7FFF, 31'h0000_0001);
    check(31'h007F_FFFF, 31'h0000_0001);
    check(31'h7FFF_FFFE, 31'h7FFF_FFFF);
    for (int i = 0; i < 5000; i++) check(31'($urandom), 31'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
