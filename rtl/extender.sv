// extender: widens the 16-bit immediate of an I-type instruction to 32 bits.
//
// ExtOp = 1 sign-extends (lw, sw, and the branch offset), ExtOp = 0
// zero-extends (ori), as the control table of the design specifies.
// Purely combinational.
module extender (
  input  logic [15:0] imm16,
  input  logic        ext_op,
  output logic [31:0] imm32
);
  always_comb imm32 = {{16{ext_op & imm16[15]}}, imm16};
endmodule
