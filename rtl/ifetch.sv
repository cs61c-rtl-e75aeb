// ifetch: the instruction fetch unit of the single-cycle processor.
//
// Holds the PC and the instruction memory, and computes the next PC:
//   nPC_MUX_sel = nPC_sel AND Zero
//   PC <= PC + 4 + SignExt(imm16)*4   when nPC_MUX_sel = 1 (beq taken)
//   PC <= PC + 4                      otherwise
// The control unit encodes nPC_sel as "branch / not branch" and the AND gate
// turns it into the direct mux select, as the design prescribes. The PC is a
// 30-bit register whose two low bits read as 00, so both adders work on word
// addresses: one adds 1 (4 bytes), the other adds the sign-extended
// immediate to that sum.
//
// The jump instruction (op 000010, J-type, 26-bit target) appears in the
// design's control table with its own Jump signal but without its datapath;
// here it loads PC <= {PC+4 <31:28>, target, 00}, the usual MIPS rule.
// That rule, the reset value 0 of the PC and its synchronous active-high
// reset are this design's own choices.
//
// Timing: the PC is clocked on the falling edge of Clk (clock bubble on the
// drawing); the instruction and all next-PC logic are combinational, so a new
// instruction is available one edge after the previous one was.
module ifetch #(
  parameter int unsigned IMEM_WORDS = 1024
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        npc_sel,
  input  logic        zero,
  input  logic        jump,
  output logic [31:0] pc,
  output logic [31:0] instr,
  // program load port of the instruction memory
  input  logic        prog_we,
  input  logic [31:0] prog_addr,
  input  logic [31:0] prog_data
);
  logic [29:0] pc_q;          // word address; PC<1:0> are always 00
  logic [29:0] pc_plus1;      // PC + 4
  logic [29:0] pc_branch;     // PC + 4 + SignExt(imm16)*4
  logic [29:0] pc_seq;        // output of the nPC mux
  logic [29:0] pc_jump;
  logic [29:0] pc_next;
  logic [31:0] imm_ext;
  logic        npc_mux_sel;

  assign pc = {pc_q, 2'b00};

  inst_memory #(.WORDS(IMEM_WORDS)) u_imem (
    .clk      (clk),
    .adr      (pc),
    .instr    (instr),
    .prog_we  (prog_we),
    .prog_addr(prog_addr),
    .prog_data(prog_data)
  );

  extender u_ext (
    .imm16 (instr[15:0]),
    .ext_op(1'b1),
    .imm32 (imm_ext)
  );

  assign npc_mux_sel = npc_sel & zero;
  assign pc_plus1    = pc_q + 30'd1;
  assign pc_branch   = pc_plus1 + imm_ext[29:0];
  assign pc_jump     = {pc_plus1[29:26], instr[25:0]};

  mux2 #(.WIDTH(30)) u_npc_mux (
    .sel(npc_mux_sel),
    .d0 (pc_plus1),
    .d1 (pc_branch),
    .y  (pc_seq)
  );

  mux2 #(.WIDTH(30)) u_jump_mux (
    .sel(jump),
    .d0 (pc_seq),
    .d1 (pc_jump),
    .y  (pc_next)
  );

  always_ff @(negedge clk) begin
    if (rst) pc_q <= '0;
    else     pc_q <= pc_next;
  end
endmodule
