// tb_circular_csa: checks the circular 3-2 counter: sum + carry must equal
// a + b + c modulo 2^31 - 1, and the sum word must be the bitwise XOR.
module tb_circular_csa;
  import tb_ref_pkg::*;

  logic [30:0] a, b, c, s, cy;
  int checks = 0, failures = 0;

  circular_csa #(.W(31)) dut (.a, .b, .c, .sum(s), .carry(cy));

  task automatic check(input logic [30:0] va, vb, vc);
    a = va; b = vb; c = vc;
    #1;
    checks += 2;
    if (mod_m(64'(s) + 64'(cy)) != mod_m(64'(va) + 64'(vb) + 64'(vc))) begin
      failures++; $display("FAIL %h %h %h -> %h %h", va, vb, vc, s, cy);
    end
    if (s !== (va ^ vb ^ vc)) begin failures++; $display("FAIL sum %h", s); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(31'h4000_0000, 31'h4000_0000, 31'h0);          // top carry wraps
    check(31'h7FFF_FFFF, 31'h7FFF_FFFF, 31'h7FFF_FFFF);
    check(31'h1, 31'h1, 31'h1);
    for (int i = 0; i < 2000; i++) check(31'($urandom), 31'($urandom), 31'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
