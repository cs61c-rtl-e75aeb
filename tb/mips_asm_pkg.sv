// mips_asm_pkg: instruction encoders for the processor testbenches.
//
// Builds 32-bit instruction words from their fields, using the R-, I- and
// J-type formats (op<31:26> rs<25:21> rt<20:16> rd<15:11> shamt<10:6>
// funct<5:0>; immediate<15:0>; target<25:0>) and the opcode/function values
// of the instruction set. The values are written out here independently of
// the RTL package so that the testbenches do not reuse the design's own
// constants.
package mips_asm_pkg;
  function automatic logic [31:0] enc_add(input int rd, input int rs, input int rt);
    return {6'b000000, 5'(rs), 5'(rt), 5'(rd), 5'd0, 6'b100000};
  endfunction
  function automatic logic [31:0] enc_sub(input int rd, input int rs, input int rt);
    return {6'b000000, 5'(rs), 5'(rt), 5'(rd), 5'd0, 6'b100010};
  endfunction
  function automatic logic [31:0] enc_ori(input int rt, input int rs, input logic [15:0] imm);
    return {6'b001101, 5'(rs), 5'(rt), imm};
  endfunction
  function automatic logic [31:0] enc_lw(input int rt, input int rs, input logic [15:0] imm);
    return {6'b100011, 5'(rs), 5'(rt), imm};
  endfunction
  function automatic logic [31:0] enc_sw(input int rt, input int rs, input logic [15:0] imm);
    return {6'b101011, 5'(rs), 5'(rt), imm};
  endfunction
  function automatic logic [31:0] enc_beq(input int rs, input int rt, input logic [15:0] off);
    return {6'b000100, 5'(rs), 5'(rt), off};
  endfunction
  function automatic logic [31:0] enc_j(input logic [25:0] target);
    return {6'b000010, target};
  endfunction
endpackage
