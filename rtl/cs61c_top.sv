// cs61c_top: the single-cycle MIPS-subset processor and the two example
// programmable logic arrays, side by side.
//
// The processor (single_cycle_cpu) is the main design: its control unit is
// itself a PLA whose personality is the control table. The stand-alone
// PLAs are the textbook examples of shared product terms (pla_shared_terms)
// and of the short-hand cross notation (pla_xnor_xor), plus a PLA that is
// programmed in the field by blowing fuses (pla_fuse, 3 inputs, 5 terms,
// 4 outputs). They share nothing with the processor and have their own
// ports, prefixed pla1_, pla2_ and pla3_. See each module for its timing;
// the processor is clocked on the falling edge of clk, pla3 is programmed
// on the rising edge of pla3_clk, and all PLA outputs are combinational.
module cs61c_top
  import cpu_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 1024
) (
  // processor
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
  output logic [31:0] alu_result,
  // shared-term PLA example
  input  logic        pla1_a,
  input  logic        pla1_b,
  input  logic        pla1_c,
  output logic [3:0]  pla1_f,     // {F3, F2, F1, F0}
  // XNOR/XOR PLA example
  input  logic        pla2_a,
  input  logic        pla2_b,
  input  logic        pla2_c,
  input  logic        pla2_d,
  output logic [1:0]  pla2_f,     // {F1, F0}
  // field-programmable (fuse) PLA
  input  logic        pla3_clk,
  input  logic        pla3_rst,
  input  logic        pla3_prog_en,
  input  logic [1:0]  pla3_prog_plane,
  input  logic [2:0]  pla3_prog_row,
  input  logic [2:0]  pla3_prog_col,
  input  logic [2:0]  pla3_in,
  output logic [3:0]  pla3_out
);
  logic [4:0] pla3_terms;

  single_cycle_cpu #(
    .IMEM_WORDS(IMEM_WORDS),
    .DMEM_WORDS(DMEM_WORDS)
  ) u_cpu (
    .clk       (clk),
    .rst       (rst),
    .prog_we   (prog_we),
    .prog_addr (prog_addr),
    .prog_data (prog_data),
    .pc        (pc),
    .instr     (instr),
    .ctrl      (ctrl),
    .zero      (zero),
    .rw        (rw),
    .bus_w     (bus_w),
    .bus_b     (bus_b),
    .alu_result(alu_result)
  );

  pla_shared_terms u_pla1 (
    .a (pla1_a), .b (pla1_b), .c (pla1_c),
    .f0(pla1_f[0]), .f1(pla1_f[1]), .f2(pla1_f[2]), .f3(pla1_f[3])
  );

  pla_xnor_xor u_pla2 (
    .a (pla2_a), .b (pla2_b), .c (pla2_c), .d (pla2_d),
    .f0(pla2_f[0]), .f1(pla2_f[1])
  );

  pla_fuse #(.N_IN(3), .N_TERMS(5), .N_OUT(4), .ANTIFUSE(1'b0)) u_pla3 (
    .clk       (pla3_clk),
    .rst       (pla3_rst),
    .prog_en   (pla3_prog_en),
    .prog_plane(pla3_prog_plane),
    .prog_row  (pla3_prog_row),
    .prog_col  (pla3_prog_col),
    .in        (pla3_in),
    .terms     (pla3_terms),
    .out       (pla3_out)
  );
endmodule
