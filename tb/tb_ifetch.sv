// tb_ifetch: self-checking testbench of the instruction fetch unit.
// The instruction memory is filled with random words; nPC_sel, Zero and
// Jump are then driven at random every cycle and the PC is compared with
// a model of the next-PC rules after every falling edge:
//   PC + 4, PC + 4 + SignExt(imm16)*4 when nPC_sel AND Zero,
//   {PC+4 <31:28>, target, 00} when Jump.
// The instruction output is checked against the loaded memory, and the
// testbench counts that taken branches, untaken branches (nPC_sel with
// Zero = 0) and jumps all occurred.
module tb_ifetch;
  localparam int WORDS = 1024;
  int checks = 0, failures = 0;
  int n_taken = 0, n_untaken = 0, n_jump = 0;
  logic        clk = 0, rst = 1, npc_sel = 0, zero = 0, jump = 0;
  logic        we = 0;
  logic [31:0] paddr = 0, pdata = 0, pc, instr;
  logic [31:0] mem [WORDS];
  logic [31:0] exp_pc, pc4;

  ifetch #(.IMEM_WORDS(WORDS)) dut (
    .clk(clk), .rst(rst), .npc_sel(npc_sel), .zero(zero), .jump(jump),
    .pc(pc), .instr(instr), .prog_we(we), .prog_addr(paddr), .prog_data(pdata));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < WORDS; i++) begin
      mem[i] = $urandom;
      @(posedge clk); we = 1; paddr = 32'(i) << 2; pdata = mem[i];
    end
    @(posedge clk); we = 0;
    @(negedge clk); #1;
    exp_pc = 0;
    rst = 0;
    checks++;
    if (pc !== 0) begin failures++; $display("reset PC = %h", pc); end
    for (int n = 0; n < 3000; n++) begin
      @(posedge clk);
      npc_sel = 1'($urandom_range(1));
      zero    = 1'($urandom_range(1));
      jump    = ($urandom_range(7) == 0);
      #1;
      checks++;
      if (instr !== mem[exp_pc[11:2]]) begin failures++; $display("instr at %h = %h exp %h", exp_pc, instr, mem[exp_pc[11:2]]); end
      pc4 = exp_pc + 32'd4;
      if (jump) begin
        exp_pc = {pc4[31:28], mem[exp_pc[11:2]][25:0], 2'b00};
        n_jump++;
      end else if (npc_sel && zero) begin
        exp_pc = pc4 + (32'(signed'(mem[exp_pc[11:2]][15:0])) << 2);
        n_taken++;
      end else begin
        if (npc_sel) n_untaken++;
        exp_pc = pc4;
      end
      @(negedge clk); #1;
      checks++;
      if (pc !== exp_pc) begin failures++; $display("cycle %0d PC = %h exp %h", n, pc, exp_pc); end
    end
    checks += 3;
    if (n_taken == 0)   begin failures++; $display("no taken branch"); end
    if (n_untaken == 0) begin failures++; $display("no untaken branch"); end
    if (n_jump == 0)    begin failures++; $display("no jump"); end
    $display("taken=%0d untaken=%0d jumps=%0d", n_taken, n_untaken, n_jump);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
