// single_cycle_cpu: a single-cycle processor for a MIPS subset.
//
// Executes add, sub, ori, lw, sw, beq and j, each in one clock cycle:
// the fetch unit presents Instruction<31:0> at the PC, the control unit
// decodes op<31:26> and func<5:0> into the datapath's control points, the
// datapath reads Rs<25:21> and Rt<20:16>, computes, and on the falling clock
// edge writes the register file or data memory and the new PC together.
//   add  R[rd] <- R[rs] + R[rt]                    PC <- PC + 4
//   sub  R[rd] <- R[rs] - R[rt]                    PC <- PC + 4
//   ori  R[rt] <- R[rs] | ZeroExt(imm16)           PC <- PC + 4
//   lw   R[rt] <- MEM[R[rs] + SignExt(imm16)]      PC <- PC + 4
//   sw   MEM[R[rs] + SignExt(imm16)] <- R[rt]      PC <- PC + 4
//   beq  PC <- PC + 4 + (R[rs] == R[rt] ? SignExt(imm16)*4 : 0)
//   j    PC <- {PC+4 <31:28>, target<25:0>, 00}
// The j datapath, the memory sizes, the reset and the program-load port are
// this design's own choices (see ifetch, data_memory, inst_memory).
//
// Interface: clk, synchronous active-high rst (clears PC and registers).
// While rst is 1 a host loads the program through prog_*. The remaining
// outputs expose each cycle's instruction and its effects: the register
// write (ctrl.reg_wr, rw, bus_w), the memory write (ctrl.mem_wr,
// alu_result as address, bus_b as data) and the next PC after the edge.
module single_cycle_cpu
  import cpu_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 1024
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        prog_we,
  input  logic [31:0] prog_addr,
  input  logic [31:0] prog_data,
  output logic [31:0] pc,
  output logic [31:0] instr,
  output ctrl_t       ctrl,
  output logic        zero,
  output logic [4:0]  rw,
  output logic [31:0] bus_w,
  output logic [31:0] bus_b,
  output logic [31:0] alu_result
);
  ifetch #(.IMEM_WORDS(IMEM_WORDS)) u_ifu (
    .clk      (clk),
    .rst      (rst),
    .npc_sel  (ctrl.npc_sel),
    .zero     (zero),
    .jump     (ctrl.jump),
    .pc       (pc),
    .instr    (instr),
    .prog_we  (prog_we),
    .prog_addr(prog_addr),
    .prog_data(prog_data)
  );

  control u_ctrl (
    .op  (instr[31:26]),
    .func(instr[5:0]),
    .ctrl(ctrl)
  );

  datapath #(.DMEM_WORDS(DMEM_WORDS)) u_dp (
    .clk       (clk),
    .rst       (rst),
    .ctrl      (ctrl),
    .rs        (instr[25:21]),
    .rt        (instr[20:16]),
    .rd        (instr[15:11]),
    .imm16     (instr[15:0]),
    .zero      (zero),
    .rw        (rw),
    .bus_w     (bus_w),
    .bus_b     (bus_b),
    .alu_result(alu_result)
  );
endmodule
