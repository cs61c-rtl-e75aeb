// tb_mux2: self-checking testbench of mux2 at 32 and 5 bits.
// Random data and select; the expected output is picked in the testbench.
module tb_mux2;
  int checks = 0, failures = 0;
  logic        s32, s5;
  logic [31:0] a32, b32, y32;
  logic [4:0]  a5, b5, y5;

  mux2 #(.WIDTH(32)) dut32 (.sel(s32), .d0(a32), .d1(b32), .y(y32));
  mux2 #(.WIDTH(5))  dut5  (.sel(s5),  .d0(a5),  .d1(b5),  .y(y5));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      a32 = $urandom; b32 = $urandom; s32 = 1'($urandom);
      a5 = 5'($urandom); b5 = 5'($urandom); s5 = 1'($urandom);
      #1;
      checks += 2;
      if (y32 !== (s32 ? b32 : a32)) begin failures++; $display("mux32 sel=%0b y=%h", s32, y32); end
      if (y5 !== (s5 ? b5 : a5))     begin failures++; $display("mux5 sel=%0b y=%h", s5, y5); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
