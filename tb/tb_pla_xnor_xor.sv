// tb_pla_xnor_xor: exhaustive self-checking testbench of the four-input PLA
// example: F0 must be A XNOR B and F1 must be C XOR D.
module tb_pla_xnor_xor;
  int checks = 0, failures = 0;
  logic a, b, c, d, f0, f1;

  pla_xnor_xor dut (.a(a), .b(b), .c(c), .d(d), .f0(f0), .f1(f1));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {a, b, c, d} = 4'(v); #1;
      checks += 2;
      if (f0 !== (a ~^ b)) begin failures++; $display("ABCD=%04b F0=%b", v, f0); end
      if (f1 !== (c ^ d))  begin failures++; $display("ABCD=%04b F1=%b", v, f1); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
