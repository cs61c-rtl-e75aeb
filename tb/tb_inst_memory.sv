// tb_inst_memory: self-checking testbench of the instruction memory.
// Loads every word through the program port with a value derived from its
// index, then reads the whole memory back at random and in order.
module tb_inst_memory;
  localparam int WORDS = 1024;
  int checks = 0, failures = 0;
  logic        clk = 0, we = 0;
  logic [31:0] adr = 0, paddr = 0, pdata = 0, instr;

  inst_memory #(.WORDS(WORDS)) dut (.clk(clk), .adr(adr), .instr(instr),
                                    .prog_we(we), .prog_addr(paddr), .prog_data(pdata));

  always #5 clk = ~clk;

  function automatic logic [31:0] pattern(input int i);
    return (32'(i) * 32'h9e37_79b9) ^ 32'h1234_5678;
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int i;
    for (i = 0; i < WORDS; i++) begin
      @(posedge clk);
      we = 1; paddr = 32'(i) << 2; pdata = pattern(i);
    end
    @(posedge clk); we = 0;
    for (i = 0; i < WORDS; i++) begin
      adr = 32'(i) << 2; #1;
      checks++;
      if (instr !== pattern(i)) begin failures++; $display("word %0d = %h exp %h", i, instr, pattern(i)); end
    end
    for (int n = 0; n < 500; n++) begin
      i = $urandom_range(WORDS - 1);
      adr = 32'(i) << 2; #1;
      checks++;
      if (instr !== pattern(i)) begin failures++; $display("word %0d = %h exp %h", i, instr, pattern(i)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
