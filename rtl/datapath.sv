// datapath: the single-cycle datapath.
//
// Wiring, as on the datapath drawing:
//   Rw = RegDst ? Rd : Rt,  Ra = Rs,  Rb = Rt
//   busA -> ALU input A;  ALU input B = ALUSrc ? Extender(imm16) : busB
//   ALU result -> data memory Adr and MemtoReg mux input 0
//   busB -> data memory Data In;  data memory output -> MemtoReg mux input 1
//   busW = MemtoReg mux output -> register file write data
//   Zero -> fetch unit
// All control points come from the control unit in one ctrl_t. Register
// file and data memory write on the falling clock edge; everything else is
// combinational, so an instruction's whole register transfer happens within
// one clock cycle. The alu_result, bus_b and bus_w outputs are brought out
// so that the processor's effects can be observed.
module datapath
  import cpu_pkg::*;
#(
  parameter int unsigned DMEM_WORDS = 1024
) (
  input  logic        clk,
  input  logic        rst,
  input  ctrl_t       ctrl,
  input  logic [4:0]  rs,
  input  logic [4:0]  rt,
  input  logic [4:0]  rd,
  input  logic [15:0] imm16,
  output logic        zero,
  output logic [4:0]  rw,
  output logic [31:0] bus_w,
  output logic [31:0] bus_b,
  output logic [31:0] alu_result
);
  logic [31:0] bus_a;
  logic [31:0] imm_ext;
  logic [31:0] alu_b;
  logic [31:0] mem_out;

  mux2 #(.WIDTH(5)) u_regdst_mux (
    .sel(ctrl.reg_dst), .d0(rt), .d1(rd), .y(rw)
  );

  regfile u_rf (
    .clk   (clk),
    .rst   (rst),
    .reg_wr(ctrl.reg_wr),
    .rw    (rw),
    .bus_w (bus_w),
    .ra    (rs),
    .rb    (rt),
    .bus_a (bus_a),
    .bus_b (bus_b)
  );

  extender u_ext (
    .imm16 (imm16),
    .ext_op(ctrl.ext_op),
    .imm32 (imm_ext)
  );

  mux2 #(.WIDTH(32)) u_alusrc_mux (
    .sel(ctrl.alu_src), .d0(bus_b), .d1(imm_ext), .y(alu_b)
  );

  alu u_alu (
    .a      (bus_a),
    .b      (alu_b),
    .alu_ctr(ctrl.alu_ctr),
    .result (alu_result),
    .zero   (zero)
  );

  data_memory #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk     (clk),
    .wr_en   (ctrl.mem_wr),
    .adr     (alu_result),
    .data_in (bus_b),
    .data_out(mem_out)
  );

  mux2 #(.WIDTH(32)) u_memtoreg_mux (
    .sel(ctrl.mem_to_reg), .d0(alu_result), .d1(mem_out), .y(bus_w)
  );
endmodule
