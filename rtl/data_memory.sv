// data_memory: the data memory of the single-cycle datapath.
//
// Ports as on the datapath drawing: Adr (the ALU result), Data In (busB),
// WrEn (MemWr), Clk, and a 32-bit data output that goes to input 1 of the
// MemtoReg mux. A read is combinational, so lw completes in one cycle; a
// write happens on the falling clock edge when WrEn is 1.
//
// Own choices, where the design says nothing: memory is word-organised,
// addressed by byte address bits <AW+1:2> (the two low bits are ignored,
// only aligned words are accessed), and holds WORDS words (default 1024,
// 4 KiB). Higher address bits wrap. Contents are not reset.
module data_memory #(
  parameter int unsigned WORDS = 1024
) (
  input  logic        clk,
  input  logic        wr_en,
  input  logic [31:0] adr,
  input  logic [31:0] data_in,
  output logic [31:0] data_out
);
  localparam int unsigned AW = $clog2(WORDS);

  logic [31:0]   mem [WORDS];
  logic [AW-1:0] widx;

  assign widx = adr[AW+1:2];

  always_ff @(negedge clk) begin
    if (wr_en) mem[widx] <= data_in;
  end

  assign data_out = mem[widx];
endmodule
