// regfile: the 32 x 32-bit register file of the single-cycle datapath.
//
// Two combinational read ports (Ra -> busA, Rb -> busB) and one write port
// (Rw, busW, RegWr). The write takes effect on the active clock edge, so an
// instruction reads the old values during its cycle and its result appears
// at the end of it. Like every state element of this processor the file is
// clocked on the falling edge of Clk, as the clock bubble on the datapath
// drawing shows.
//
// Own choices, where the design says nothing: register 0 always reads zero
// and ignores writes (the usual MIPS convention), and a synchronous,
// active-high reset clears all registers so that simulation starts from a
// known state.
module regfile
  import cpu_pkg::*;
#(
  parameter int unsigned N = NREGS,  // number of registers
  parameter int unsigned W = XLEN    // register width
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 reg_wr,
  input  logic [$clog2(N)-1:0] rw,
  input  logic [W-1:0]         bus_w,
  input  logic [$clog2(N)-1:0] ra,
  input  logic [$clog2(N)-1:0] rb,
  output logic [W-1:0]         bus_a,
  output logic [W-1:0]         bus_b
);
  logic [W-1:0] regs [N];

  always_ff @(negedge clk) begin
    if (rst) begin
      for (int i = 0; i < N; i++) regs[i] <= '0;
    end else if (reg_wr && rw != '0) begin
      regs[rw] <= bus_w;
    end
  end

  always_comb begin
    bus_a = (ra == '0) ? '0 : regs[ra];
    bus_b = (rb == '0) ? '0 : regs[rb];
  end
endmodule
