// tb_control: self-checking testbench of the main control unit.
// Every instruction of the set is applied, with random func bits for the
// I- and J-type ones, and each control signal is compared with the control
// table, written out below as literal bits (x entries are not checked).
// Opcodes and R-type function codes outside the set must assert no write,
// no branch and no jump.
module tb_control;
  import cpu_pkg::*;
  int checks = 0, failures = 0;
  logic [5:0] op, func;
  ctrl_t      ctrl;

  control dut (.op(op), .func(func), .ctrl(ctrl));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One column of the control table. -1 = don't care.
  typedef struct {
    string    name;
    bit [5:0] op;
    bit [5:0] func;
    bit       rtype;
    int       regdst, alusrc, memtoreg, regwr, memwr, npcsel, jump, extop;
    int       aluctr;   // 3-bit code or -1
  } col_t;

  task automatic check1(input string what, input string sig, input int exp, input logic got);
    if (exp < 0) return;
    checks++;
    if (got !== 1'(exp)) begin failures++; $display("%s: %s = %0b expected %0d", what, sig, got, exp); end
  endtask

  task automatic check_col(input col_t c);
    check1(c.name, "RegDst",   c.regdst,   ctrl.reg_dst);
    check1(c.name, "ALUSrc",   c.alusrc,   ctrl.alu_src);
    check1(c.name, "MemtoReg", c.memtoreg, ctrl.mem_to_reg);
    check1(c.name, "RegWr",    c.regwr,    ctrl.reg_wr);
    check1(c.name, "MemWr",    c.memwr,    ctrl.mem_wr);
    check1(c.name, "nPC_sel",  c.npcsel,   ctrl.npc_sel);
    check1(c.name, "Jump",     c.jump,     ctrl.jump);
    check1(c.name, "ExtOp",    c.extop,    ctrl.ext_op);
    if (c.aluctr >= 0) begin
      checks++;
      if (3'(ctrl.alu_ctr) !== 3'(c.aluctr)) begin
        failures++; $display("%s: ALUctr = %03b expected %03b", c.name, ctrl.alu_ctr, 3'(c.aluctr));
      end
    end
  endtask

  initial begin
    // add = 010, sub = 110, or = 001
    col_t tbl[7] = '{
      '{"add", 6'b000000, 6'b100000, 1, 1, 0, 0, 1, 0, 0, 0, -1, 3'b010},
      '{"sub", 6'b000000, 6'b100010, 1, 1, 0, 0, 1, 0, 0, 0, -1, 3'b110},
      '{"ori", 6'b001101, 6'b000000, 0, 0, 1, 0, 1, 0, 0, 0,  0, 3'b001},
      '{"lw",  6'b100011, 6'b000000, 0, 0, 1, 1, 1, 0, 0, 0,  1, 3'b010},
      '{"sw",  6'b101011, 6'b000000, 0, -1, 1, -1, 0, 1, 0, 0, 1, 3'b010},
      '{"beq", 6'b000100, 6'b000000, 0, -1, 0, -1, 0, 0, 1, 0, -1, 3'b110},
      '{"j",   6'b000010, 6'b000000, 0, -1, -1, -1, 0, 0, 0, 1, -1, -1}
    };
    foreach (tbl[i]) begin
      for (int k = 0; k < 20; k++) begin
        op = tbl[i].op;
        func = tbl[i].rtype ? tbl[i].func : 6'($urandom);
        #1;
        check_col(tbl[i]);
      end
    end
    // undefined opcodes and R-type function codes
    for (int k = 0; k < 300; k++) begin
      op = 6'($urandom); func = 6'($urandom);
      if (op == 6'b000000 && (func == 6'b100000 || func == 6'b100010)) continue;
      if (op inside {6'b001101, 6'b100011, 6'b101011, 6'b000100, 6'b000010}) continue;
      #1;
      checks++;
      if (ctrl.reg_wr || ctrl.mem_wr || ctrl.npc_sel || ctrl.jump) begin
        failures++; $display("undefined op=%06b func=%06b asserts a write/branch/jump", op, func);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
