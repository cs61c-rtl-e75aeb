// mux2: two-input multiplexer of WIDTH bits.
//
// Used for every multiplexer of the single-cycle datapath: the RegDst mux
// (5 bits, rd/rt), the ALUSrc mux (32 bits, busB/extended immediate), the
// MemtoReg mux (32 bits, ALU result/memory data) and the next-PC mux in the
// fetch unit. Input d0 is selected when sel is 0 and d1 when sel is 1, the
// input numbering printed on the datapath drawing. Purely combinational.
module mux2 #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             sel,
  input  logic [WIDTH-1:0] d0,
  input  logic [WIDTH-1:0] d1,
  output logic [WIDTH-1:0] y
);
  always_comb y = sel ? d1 : d0;
endmodule
