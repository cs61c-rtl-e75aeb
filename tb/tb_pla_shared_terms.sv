// tb_pla_shared_terms: exhaustive self-checking testbench of the
// three-input shared-term PLA example against its four equations.
module tb_pla_shared_terms;
  int checks = 0, failures = 0;
  logic a, b, c, f0, f1, f2, f3;

  pla_shared_terms dut (.a(a), .b(b), .c(c), .f0(f0), .f1(f1), .f2(f2), .f3(f3));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v); #1;
      checks += 4;
      if (f0 !== (a | (~b & ~c)))        begin failures++; $display("ABC=%03b F0=%b", v, f0); end
      if (f1 !== ((a & ~c) | (a & b)))   begin failures++; $display("ABC=%03b F1=%b", v, f1); end
      if (f2 !== ((~b & ~c) | (a & b)))  begin failures++; $display("ABC=%03b F2=%b", v, f2); end
      if (f3 !== ((~b & c) | a))         begin failures++; $display("ABC=%03b F3=%b", v, f3); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
