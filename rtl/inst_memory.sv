// inst_memory: the instruction memory read by the fetch unit.
//
// The processor reads it combinationally at the PC ("Adr" on the drawing)
// and gets Instruction<31:0> in the same cycle. The design gives no way of
// filling it; here a write port (prog_we, prog_addr, prog_data), clocked on
// the falling edge like the rest of the processor, lets a host load a
// program while the processor is held in reset.
//
// Own choices: word-organised, byte address bits <AW+1:2> select the word,
// WORDS words (default 1024, 4 KiB); higher address bits wrap.
module inst_memory #(
  parameter int unsigned WORDS = 1024
) (
  input  logic        clk,
  input  logic [31:0] adr,
  output logic [31:0] instr,
  input  logic        prog_we,
  input  logic [31:0] prog_addr,   // byte address of the word to load
  input  logic [31:0] prog_data
);
  localparam int unsigned AW = $clog2(WORDS);

  logic [31:0] mem [WORDS];

  always_ff @(negedge clk) begin
    if (prog_we) mem[prog_addr[AW+1:2]] <= prog_data;
  end

  assign instr = mem[adr[AW+1:2]];
endmodule
