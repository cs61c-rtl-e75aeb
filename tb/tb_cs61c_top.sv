// tb_cs61c_top: end-to-end test of the whole top level at its default sizes.
//
// Processor: a random program of NPROG instructions (add, sub, ori, lw,
// sw, beq, j) is loaded through the program port, followed by a halt
// (beq $0,$0,-1). Branch and jump targets always lie ahead, so the program
// runs to the halt. An instruction-level model in the testbench executes
// the same program; every cycle the PC, the instruction, the register
// write (RegWr, Rw, busW) and the memory write (MemWr, address, data) of
// the processor are compared with the model, and the processor must finish
// one instruction per cycle. Loads from words never stored are not
// predicted: the first value read is adopted by the model and checked on
// every later load.
//
// The testbench counts how often each mechanism happened and fails any
// that never did: each of the seven instructions, beq taken and not taken,
// a write to register 0 being discarded, a negative sign-extended offset,
// an ori immediate with bit 15 set (zero extension).
//
// PLAs: both example arrays are driven through all input combinations and
// compared with their Boolean equations. The fuse-programmable array is
// checked blank (all outputs 0), then every fuse outside the shared-term
// personality is blown through its programming port and it must compute
// the same four functions as the fixed example.
module tb_cs61c_top;
  import cpu_pkg::*;
  import mips_asm_pkg::*;
  localparam int NPROG = 600;
  int checks = 0, failures = 0;

  logic        clk = 0, rst = 1, prog_we = 0;
  logic [31:0] prog_addr = 0, prog_data = 0;
  logic [31:0] pc, instr, bus_w, bus_b, alu_result;
  ctrl_t       ctrl;
  logic        zero;
  logic [4:0]  rw;
  logic        p1a = 0, p1b = 0, p1c = 0, p2a = 0, p2b = 0, p2c = 0, p2d = 0;
  logic [3:0]  p1f;
  logic [1:0]  p2f;
  logic        p3clk = 0, p3rst = 1, p3en = 0;
  logic [1:0]  p3plane = 0;
  logic [2:0]  p3row = 0, p3col = 0, p3in = 0;
  logic [3:0]  p3out;

  cs61c_top dut (
    .clk(clk), .rst(rst), .prog_we(prog_we), .prog_addr(prog_addr), .prog_data(prog_data),
    .pc(pc), .instr(instr), .ctrl(ctrl), .zero(zero), .rw(rw), .bus_w(bus_w),
    .bus_b(bus_b), .alu_result(alu_result),
    .pla1_a(p1a), .pla1_b(p1b), .pla1_c(p1c), .pla1_f(p1f),
    .pla2_a(p2a), .pla2_b(p2b), .pla2_c(p2c), .pla2_d(p2d), .pla2_f(p2f),
    .pla3_clk(p3clk), .pla3_rst(p3rst), .pla3_prog_en(p3en), .pla3_prog_plane(p3plane),
    .pla3_prog_row(p3row), .pla3_prog_col(p3col), .pla3_in(p3in), .pla3_out(p3out));

  always #5 clk = ~clk;
  always #7 p3clk = ~p3clk;

  // mechanism counters
  typedef enum int { M_ADD, M_SUB, M_ORI, M_LW, M_SW, M_BEQ_T, M_BEQ_NT, M_J,
                     M_R0_WRITE, M_NEG_OFS, M_ORI_HI, M_PLA1, M_PLA2, M_FUSE_BLOW, M_PLA3, M_NUM } mech_e;
  int mech [M_NUM];

  logic [31:0] prog [NPROG + 1];
  logic [31:0] R [32];
  logic [31:0] M [int];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect32(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s = %h expected %h", what, got, exp); end
  endtask

  function automatic int reg_pick();
    return $urandom_range(9) == 0 ? 0 : $urandom_range(1, 12);  // few registers: more reuse
  endfunction

  task automatic gen_program();
    int k, off, lim;
    for (int i = 0; i < NPROG; i++) begin
      k = $urandom_range(99);
      lim = NPROG - 1 - i;                      // furthest forward offset that stays in program
      if (i < 12)      prog[i] = enc_ori(i + 1, 0, 16'($urandom));
      else if (k < 18) prog[i] = enc_add(reg_pick(), reg_pick(), reg_pick());
      else if (k < 34) prog[i] = enc_sub(reg_pick(), reg_pick(), reg_pick());
      else if (k < 50) prog[i] = enc_ori(reg_pick(), reg_pick(), 16'($urandom));
      else if (k < 64) prog[i] = enc_lw(reg_pick(), reg_pick(), 16'($urandom_range(0, 127) * 4 - 256));
      else if (k < 78) prog[i] = enc_sw(reg_pick(), reg_pick(), 16'($urandom_range(0, 127) * 4 - 256));
      else if (k < 92) begin
        off = $urandom_range(0, lim < 4 ? lim : 4);
        k = reg_pick();
        prog[i] = enc_beq(k, ($urandom_range(2) == 0) ? k : reg_pick(), 16'(off));
      end else begin
        off = $urandom_range(0, lim < 4 ? lim : 4);
        prog[i] = enc_j(26'(i + 1 + off));
      end
    end
    prog[NPROG] = enc_beq(0, 0, 16'hffff);      // halt
  endtask

  task automatic run_cpu();
    logic [31:0] mpc, ins, a, b, se, ze, res, wb, npc;
    logic [5:0]  op, fn;
    logic [4:0]  rs, rt, rd, dst;
    logic        wr, mw;
    int          widx, cycles;
    gen_program();
    for (int i = 0; i <= NPROG; i++) begin
      @(posedge clk);
      prog_we = 1; prog_addr = 32'(i) << 2; prog_data = prog[i];
    end
    @(posedge clk); prog_we = 0;
    @(negedge clk);
    @(posedge clk); rst = 0;
    for (int i = 0; i < 32; i++) R[i] = 0;
    mpc = 0;
    cycles = 0;
    while (mpc != 32'(NPROG) * 4 && cycles < 5 * NPROG) begin
      #1;
      ins = prog[mpc[31:2]];
      expect32("PC", pc, mpc);
      expect32("instruction", instr, ins);
      op = ins[31:26]; fn = ins[5:0];
      rs = ins[25:21]; rt = ins[20:16]; rd = ins[15:11];
      a = R[rs]; b = R[rt];
      se = 32'(signed'(ins[15:0])); ze = {16'h0, ins[15:0]};
      wr = 0; mw = 0; dst = rt; wb = 0; res = 0;
      npc = mpc + 4;
      case (op)
        6'b000000: begin
          dst = rd; wr = 1;
          if (fn == 6'b100000) begin wb = a + b; mech[M_ADD]++; end
          else                 begin wb = a - b; mech[M_SUB]++; end
        end
        6'b001101: begin wr = 1; wb = a | ze; mech[M_ORI]++; if (ins[15]) mech[M_ORI_HI]++; end
        6'b100011: begin
          wr = 1; res = a + se; widx = int'(res[11:2]);
          if (!M.exists(widx)) M[widx] = bus_w;
          wb = M[widx]; mech[M_LW]++; if (ins[15]) mech[M_NEG_OFS]++;
        end
        6'b101011: begin mw = 1; res = a + se; mech[M_SW]++; if (ins[15]) mech[M_NEG_OFS]++; end
        6'b000100: begin
          if (a == b) begin npc = mpc + 4 + (se << 2); mech[M_BEQ_T]++; end
          else mech[M_BEQ_NT]++;
        end
        default: begin npc = {npc[31:28], ins[25:0], 2'b00}; mech[M_J]++; end
      endcase
      checks += 2;
      if (ctrl.reg_wr !== wr) begin failures++; $display("pc %h: RegWr = %0b expected %0b", mpc, ctrl.reg_wr, wr); end
      if (ctrl.mem_wr !== mw) begin failures++; $display("pc %h: MemWr = %0b expected %0b", mpc, ctrl.mem_wr, mw); end
      if (wr) begin
        expect32("Rw", 32'(rw), 32'(dst));
        expect32("busW", bus_w, wb);
        if (dst == 0) mech[M_R0_WRITE]++;
      end
      if (mw) begin
        expect32("store address", alu_result, res);
        expect32("store data", bus_b, b);
      end
      @(negedge clk);
      cycles++;
      if (wr && dst != 0) R[dst] = wb;
      if (mw) M[int'(res[11:2])] = b;
      mpc = npc;
      @(posedge clk);
    end
    #1;
    expect32("final PC", pc, 32'(NPROG) * 4);
    $display("program finished after %0d cycles", cycles);
    // single cycle: one instruction per clock; stays on the halt afterwards
    repeat (3) @(negedge clk);
    #1;
    expect32("PC after halt", pc, 32'(NPROG) * 4);
  endtask

  task automatic run_plas();
    logic a, b, c, d;
    for (int v = 0; v < 8; v++) begin
      {p1a, p1b, p1c} = 3'(v); {a, b, c} = 3'(v); #1;
      checks++;
      if (p1f !== {(~b & c) | a, (~b & ~c) | (a & b), (a & ~c) | (a & b), a | (~b & ~c)}) begin
        failures++; $display("PLA1 ABC=%03b F=%b", v, p1f);
      end
      mech[M_PLA1]++;
    end
    for (int v = 0; v < 16; v++) begin
      {p2a, p2b, p2c, p2d} = 4'(v); {a, b, c, d} = 4'(v); #1;
      checks++;
      if (p2f !== {c ^ d, a ~^ b}) begin failures++; $display("PLA2 ABCD=%04b F=%b", v, p2f); end
      mech[M_PLA2]++;
    end
  endtask

  task automatic blow(input int plane, input int row, input int col);
    @(posedge p3clk); #1;
    p3en = 1; p3plane = 2'(plane); p3row = 3'(row); p3col = 3'(col);
    @(posedge p3clk); #1;
    p3en = 0;
    mech[M_FUSE_BLOW]++;
  endtask

  task automatic run_fuse_pla();
    // wanted connections; inputs bit 2 = A, 1 = B, 0 = C; terms AB, B'C, AC', B'C', A
    bit [2:0] wt [5] = '{3'b110, 3'b001, 3'b100, 3'b000, 3'b100};
    bit [2:0] wc [5] = '{3'b000, 3'b010, 3'b001, 3'b011, 3'b000};
    bit [4:0] wo [4] = '{5'b11000, 5'b00101, 5'b01001, 5'b10010};
    logic a, b, c;
    @(posedge p3clk); #1 p3rst = 0;
    for (int v = 0; v < 8; v++) begin
      p3in = 3'(v); #1;
      checks++;
      if (p3out !== 4'b0000) begin failures++; $display("blank fuse PLA out=%b", p3out); end
    end
    for (int t = 0; t < 5; t++)
      for (int i = 0; i < 3; i++) begin
        if (!wt[t][i]) blow(0, t, i);
        if (!wc[t][i]) blow(1, t, i);
      end
    for (int o = 0; o < 4; o++)
      for (int t = 0; t < 5; t++)
        if (!wo[o][t]) blow(2, o, t);
    for (int v = 0; v < 8; v++) begin
      p3in = 3'(v); {a, b, c} = 3'(v); #1;
      checks++;
      if (p3out !== {(~b & c) | a, (~b & ~c) | (a & b), (a & ~c) | (a & b), a | (~b & ~c)}) begin
        failures++; $display("fuse PLA ABC=%03b F=%b", v, p3out);
      end
      mech[M_PLA3]++;
    end
  endtask

  initial begin
    run_plas();
    run_fuse_pla();
    run_cpu();
    for (int m = 0; m < M_NUM; m++) begin
      checks++;
      $display("%-12s %0d", mech_e'(m), mech[m]);
      if (mech[m] == 0) begin failures++; $display("mechanism %s never happened", mech_e'(m)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
