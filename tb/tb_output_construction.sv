// tb_output_construction: the output word must be the MSB of X followed by
// the 31 LSBs of X XORed with Y.
module tb_output_construction;

  logic [31:0] x, o;
  logic [30:0] y;
  int checks = 0, failures = 0;

  output_construction dut (.x, .y, .out(o));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      x = $urandom;
      y = 31'($urandom);
      if (i == 0) begin x = 32'h8000_0000; y = 31'h7FFF_FFFF; end
      #1;
      checks += 2;
      if (o[31] !== x[31]) begin failures++; $display("FAIL msb x=%h y=%h o=%h", x, y, o); end
      for (int k = 0; k < 31; k++)
        if (o[k] !== (x[k] ^ y[k])) begin failures++; $display("FAIL bit %0d x=%h y=%h", k, x, y); break; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
