// alu: 32-bit arithmetic/logic unit of the single-cycle datapath.
//
// Three operations, selected by ALUctr<2:0>: add (add, lw, sw address),
// subtract (sub, and beq, which compares by subtracting) and bitwise or
// (ori). Zero is 1 when the result is all zeros; the fetch unit uses it to
// decide a beq. Overflow is not detected (nothing in the design uses it).
// An ALUctr value outside the three codes gives a result of 0; that value,
// like the 3-bit encoding itself (see cpu_pkg), is this design's choice.
// Purely combinational.
module alu
  import cpu_pkg::*;
(
  input  logic [31:0] a,        // busA
  input  logic [31:0] b,        // ALUSrc mux output
  input  alu_op_e     alu_ctr,
  output logic [31:0] result,
  output logic        zero
);
  always_comb begin
    unique case (alu_ctr)
      ALU_ADD: result = a + b;
      ALU_SUB: result = a - b;
      ALU_OR:  result = a | b;
      default: result = '0;
    endcase
    zero = (result == '0);
  end
endmodule
