// control: main control unit of the single-cycle processor, built as a PLA.
//
// Inputs are the opcode (instruction bits <31:26>) and the function field
// (bits <5:0>). One product term recognises each instruction:
//   add  op 000000, func 100000     sub  op 000000, func 100010
//   ori  op 001101                  lw   op 100011
//   sw   op 101011                  beq  op 000100
//   j    op 000010
// (the func bits do not take part in the I- and J-type terms). The OR plane
// then sets each control signal from the terms of the instructions that
// need it, following the control table of the design:
//
//            add sub ori lw  sw  beq j
//   RegDst    1   1   0   0   x   x  x
//   ALUSrc    0   0   1   1   1   0  x
//   MemtoReg  0   0   0   1   x   x  x
//   RegWr     1   1   1   1   0   0  0
//   MemWr     0   0   0   0   1   0  0
//   nPC_sel   0   0   0   0   0   1  0
//   Jump      0   0   0   0   0   0  1
//   ExtOp     x   x   0   1   1   x  x
//   ALUctr   add sub  or add add sub x
//
// Every don't-care (x) is programmed as 0 here, so no term is connected
// where it is not needed. An opcode that matches no term drives every
// signal to 0: no register or memory write, PC + 4. The personality is
// computed by functions from the opcode table in cpu_pkg rather than
// written out as bit patterns. Purely combinational.
module control
  import cpu_pkg::*;
(
  input  logic [5:0] op,
  input  logic [5:0] func,
  output ctrl_t      ctrl
);
  localparam int unsigned NI = 12;   // PLA inputs {op, func}
  localparam int unsigned NT = 7;    // product terms, one per instruction
  localparam int unsigned NO = 11;   // control outputs

  // Term order
  localparam int unsigned T_ADD = 0, T_SUB = 1, T_ORI = 2, T_LW = 3,
                          T_SW = 4, T_BEQ = 5, T_J = 6;

  // Output order on the OR plane
  localparam int unsigned O_REGDST = 0, O_ALUSRC = 1, O_MEMTOREG = 2,
                          O_REGWR = 3, O_MEMWR = 4, O_NPCSEL = 5,
                          O_JUMP = 6, O_EXTOP = 7, O_ALUCTR = 8;  // 8..10

  // Value each term looks for and which input bits it cares about.
  function automatic logic [NT-1:0][NI-1:0] term_value();
    logic [NT-1:0][NI-1:0] v;
    v[T_ADD] = {OP_RTYPE, FN_ADD};
    v[T_SUB] = {OP_RTYPE, FN_SUB};
    v[T_ORI] = {OP_ORI,   6'b0};
    v[T_LW]  = {OP_LW,    6'b0};
    v[T_SW]  = {OP_SW,    6'b0};
    v[T_BEQ] = {OP_BEQ,   6'b0};
    v[T_J]   = {OP_J,     6'b0};
    return v;
  endfunction

  function automatic logic [NT-1:0][NI-1:0] term_care();
    logic [NT-1:0][NI-1:0] c;
    for (int t = 0; t < NT; t++) c[t] = {6'b111111, 6'b000000};
    c[T_ADD] = '1;
    c[T_SUB] = '1;
    return c;
  endfunction

  function automatic logic [NT-1:0][NI-1:0] and_true();
    logic [NT-1:0][NI-1:0] v, c, r;
    v = term_value();
    c = term_care();
    for (int t = 0; t < NT; t++) r[t] = v[t] & c[t];
    return r;
  endfunction

  function automatic logic [NT-1:0][NI-1:0] and_comp();
    logic [NT-1:0][NI-1:0] v, c, r;
    v = term_value();
    c = term_care();
    for (int t = 0; t < NT; t++) r[t] = ~v[t] & c[t];
    return r;
  endfunction

  // Control word of each instruction, don't-cares as 0.
  function automatic logic [NO-1:0] row(input int unsigned t);
    logic [NO-1:0] r;
    r = '0;
    case (t)
      T_ADD: begin r[O_REGDST] = 1'b1; r[O_REGWR] = 1'b1;
                   r[O_ALUCTR +: 3] = ALU_ADD; end
      T_SUB: begin r[O_REGDST] = 1'b1; r[O_REGWR] = 1'b1;
                   r[O_ALUCTR +: 3] = ALU_SUB; end
      T_ORI: begin r[O_ALUSRC] = 1'b1; r[O_REGWR] = 1'b1;
                   r[O_ALUCTR +: 3] = ALU_OR; end
      T_LW:  begin r[O_ALUSRC] = 1'b1; r[O_MEMTOREG] = 1'b1; r[O_REGWR] = 1'b1;
                   r[O_EXTOP] = 1'b1; r[O_ALUCTR +: 3] = ALU_ADD; end
      T_SW:  begin r[O_ALUSRC] = 1'b1; r[O_MEMWR] = 1'b1; r[O_EXTOP] = 1'b1;
                   r[O_ALUCTR +: 3] = ALU_ADD; end
      T_BEQ: begin r[O_NPCSEL] = 1'b1; r[O_ALUCTR +: 3] = ALU_SUB; end
      T_J:   begin r[O_JUMP] = 1'b1; end
      default: r = '0;
    endcase
    return r;
  endfunction

  function automatic logic [NO-1:0][NT-1:0] or_plane();
    logic [NO-1:0][NT-1:0] p;
    logic [NO-1:0]         r;
    p = '0;
    for (int t = 0; t < NT; t++) begin
      r = row(t);
      for (int o = 0; o < NO; o++) p[o][t] = r[o];
    end
    return p;
  endfunction

  localparam logic [NT-1:0][NI-1:0] AND_TRUE = and_true();
  localparam logic [NT-1:0][NI-1:0] AND_COMP = and_comp();
  localparam logic [NO-1:0][NT-1:0] OR_PLANE = or_plane();

  logic [NT-1:0] terms;
  logic [NO-1:0] sig;

  pla #(
    .N_IN    (NI),
    .N_TERMS (NT),
    .N_OUT   (NO),
    .AND_TRUE(AND_TRUE),
    .AND_COMP(AND_COMP),
    .OR_PLANE(OR_PLANE)
  ) u_pla (
    .in   ({op, func}),
    .terms(terms),
    .out  (sig)
  );

  always_comb begin
    ctrl.reg_dst    = sig[O_REGDST];
    ctrl.alu_src    = sig[O_ALUSRC];
    ctrl.mem_to_reg = sig[O_MEMTOREG];
    ctrl.reg_wr     = sig[O_REGWR];
    ctrl.mem_wr     = sig[O_MEMWR];
    ctrl.npc_sel    = sig[O_NPCSEL];
    ctrl.jump       = sig[O_JUMP];
    ctrl.ext_op     = sig[O_EXTOP];
    ctrl.alu_ctr    = alu_op_e'(sig[O_ALUCTR +: 3]);
  end
endmodule
