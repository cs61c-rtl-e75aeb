// cpu_pkg: types and constants shared by the single-cycle MIPS-subset processor.
//
// The processor executes seven instructions: add, sub (R-type, told apart by
// the func field), ori, lw, sw, beq (I-type) and j (J-type). The opcode and
// func values below are the ones the control table of the design specifies.
// The 3-bit ALUctr encoding is this design's own choice (the control table
// only names the operations "add", "subtract" and "or"); it follows the
// common textbook convention add=010, subtract=110, or=001.
//
// ctrl_t bundles the control points of the datapath, one field per signal
// name used on the datapath drawing.
package cpu_pkg;

  localparam int unsigned XLEN = 32;   // data path width (32-bit buses)
  localparam int unsigned NREGS = 32;  // 32 general registers

  // Opcodes, instruction bits <31:26>
  localparam logic [5:0] OP_RTYPE = 6'b00_0000;
  localparam logic [5:0] OP_ORI   = 6'b00_1101;
  localparam logic [5:0] OP_LW    = 6'b10_0011;
  localparam logic [5:0] OP_SW    = 6'b10_1011;
  localparam logic [5:0] OP_BEQ   = 6'b00_0100;
  localparam logic [5:0] OP_J     = 6'b00_0010;

  // Function codes of R-type instructions, bits <5:0>
  localparam logic [5:0] FN_ADD = 6'b10_0000;
  localparam logic [5:0] FN_SUB = 6'b10_0010;

  typedef enum logic [2:0] {
    ALU_ADD = 3'b010,
    ALU_SUB = 3'b110,
    ALU_OR  = 3'b001
  } alu_op_e;

  // Control points of the datapath and the fetch unit.
  typedef struct packed {
    logic    reg_dst;    // RegDst:   1 = write rd, 0 = write rt
    logic    alu_src;    // ALUSrc:   1 = extended immediate, 0 = busB
    logic    mem_to_reg; // MemtoReg: 1 = data memory output, 0 = ALU result
    logic    reg_wr;     // RegWr:    write the register file
    logic    mem_wr;     // MemWr:    write the data memory
    logic    npc_sel;    // nPC_sel:  1 = "Br" (branch if Zero), 0 = "+4"
    logic    jump;       // Jump:     take the jump target
    logic    ext_op;     // ExtOp:    1 = sign extend, 0 = zero extend
    alu_op_e alu_ctr;    // ALUctr<2:0>
  } ctrl_t;

endpackage
