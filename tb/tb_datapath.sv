// tb_datapath: self-checking testbench of the single-cycle datapath.
// The testbench plays the control unit: each cycle it picks add, sub, ori,
// lw, sw or beq with random register numbers and immediate, sets the
// control points for it (values written out here from the control table)
// and compares the ALU result, Zero, the write-back register and busW with
// a register/memory model kept in the testbench. Loads from words never
// stored are not predicted: their value is taken from the datapath once
// and checked on every later load.
module tb_datapath;
  import cpu_pkg::*;
  localparam int DW = 1024;
  int checks = 0, failures = 0;
  int n_op [6];
  logic        clk = 0, rst = 1;
  ctrl_t       ctrl;
  logic [4:0]  rs, rt, rd, rw;
  logic [15:0] imm;
  logic        zero;
  logic [31:0] bus_w, bus_b, alu_result;
  logic [31:0] R [32];
  logic [31:0] M [int];

  datapath #(.DMEM_WORDS(DW)) dut (
    .clk(clk), .rst(rst), .ctrl(ctrl), .rs(rs), .rt(rt), .rd(rd), .imm16(imm),
    .zero(zero), .rw(rw), .bus_w(bus_w), .bus_b(bus_b), .alu_result(alu_result));

  always #5 clk = ~clk;

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

  initial begin
    int k, widx;
    logic [31:0] a, b, se, ze, res, wb;
    logic        wr;
    logic [4:0]  dst;
    ctrl = '0;
    for (int i = 0; i < 32; i++) R[i] = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 5000; n++) begin
      @(posedge clk);
      k  = (n < 40) ? 2 : $urandom_range(5);   // start by filling registers with ori
      rs = 5'($urandom); rt = 5'($urandom); rd = 5'($urandom);
      imm = 16'($urandom);
      if (k == 3 || k == 4) begin               // keep some loads/stores on a small area
        rs = 5'd0; imm = 16'($urandom_range(63) * 4);
      end
      if (k == 5 && $urandom_range(1)) rt = rs; // beq with equal operands
      n_op[k]++;
      a = R[rs]; b = R[rt];
      se = 32'(signed'(imm)); ze = {16'h0, imm};
      ctrl = '0;
      case (k)
        0: begin ctrl.reg_dst = 1; ctrl.reg_wr = 1; ctrl.alu_ctr = ALU_ADD; res = a + b; end
        1: begin ctrl.reg_dst = 1; ctrl.reg_wr = 1; ctrl.alu_ctr = ALU_SUB; res = a - b; end
        2: begin ctrl.alu_src = 1; ctrl.reg_wr = 1; ctrl.ext_op = 0; ctrl.alu_ctr = ALU_OR; res = a | ze; end
        3: begin ctrl.alu_src = 1; ctrl.mem_to_reg = 1; ctrl.reg_wr = 1; ctrl.ext_op = 1;
                 ctrl.alu_ctr = ALU_ADD; res = a + se; end
        4: begin ctrl.alu_src = 1; ctrl.mem_wr = 1; ctrl.ext_op = 1; ctrl.alu_ctr = ALU_ADD; res = a + se; end
        default: begin ctrl.npc_sel = 1; ctrl.alu_ctr = ALU_SUB; res = a - b; end
      endcase
      #1;
      expect32("ALU result", alu_result, res);
      checks++;
      if (zero !== (res == 0)) begin failures++; $display("Zero = %0b for result %h", zero, res); end
      expect32("busB", bus_b, b);
      dst = ctrl.reg_dst ? rd : rt;
      wr  = ctrl.reg_wr;
      widx = int'(res[11:2]);
      wb  = res;
      if (k == 3) begin
        if (!M.exists(widx)) M[widx] = bus_w;  // first read of an unwritten word
        wb = M[widx];
      end
      if (wr) begin
        expect32("Rw", 32'(rw), 32'(dst));
        expect32("busW", bus_w, wb);
      end
      @(negedge clk);
      if (wr && dst != 0) R[dst] = wb;
      if (k == 4) M[widx] = b;
    end
    foreach (n_op[i]) begin
      checks++;
      if (n_op[i] == 0) begin failures++; $display("operation %0d never ran", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
