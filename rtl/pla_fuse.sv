// pla_fuse: a programmable logic array that is programmed after manufacture.
//
// Same two-level structure as pla (AND plane over true and complemented
// inputs, OR plane over shared product terms), but each crosspoint is a
// programmable element held in a register instead of a parameter:
//   ANTIFUSE = 0 (fuse):      every crosspoint starts connected; programming
//                             one breaks it ("blows" the fuse).
//   ANTIFUSE = 1 (anti-fuse): every crosspoint starts open; programming one
//                             makes the connection.
// Programming is one-way: a crosspoint that has been programmed cannot be
// put back, and programming it again changes nothing.
//
// A fresh fuse array has every AND gate wired to both forms of every input,
// so every term and every output is 0 until connections are removed; a fresh
// anti-fuse array has no OR connections, so its outputs are also 0.
//
// Programming port (clocked on the rising edge of clk): when prog_en is 1,
// the crosspoint selected by prog_plane / prog_row / prog_col is programmed.
//   prog_plane = PL_AND_TRUE: term prog_row, true input prog_col
//   prog_plane = PL_AND_COMP: term prog_row, complemented input prog_col
//   prog_plane = PL_OR:       output prog_row, term prog_col
// Out-of-range rows or columns are ignored. rst (synchronous, active high)
// returns the array to its unprogrammed state, standing in for a new part.
// The evaluation path (in -> terms -> out) is combinational.
//
// The fuse/anti-fuse behaviour follows the programming principle of such
// arrays; the register-based crosspoints, the programming port and the
// reset are this design's own way of modelling it in logic. Defaults are
// the sizes of the shared-term example (3 inputs, 5 terms, 4 outputs).
module pla_fuse #(
  parameter int unsigned N_IN     = 3,
  parameter int unsigned N_TERMS  = 5,
  parameter int unsigned N_OUT    = 4,
  parameter bit          ANTIFUSE = 1'b0,
  localparam int unsigned RW = $clog2(N_TERMS > N_OUT ? N_TERMS : N_OUT),
  localparam int unsigned CW = $clog2(N_TERMS > N_IN ? N_TERMS : N_IN)
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               prog_en,
  input  logic [1:0]         prog_plane,
  input  logic [RW-1:0]      prog_row,
  input  logic [CW-1:0]      prog_col,
  input  logic [N_IN-1:0]    in,
  output logic [N_TERMS-1:0] terms,
  output logic [N_OUT-1:0]   out
);
  localparam logic [1:0] PL_AND_TRUE = 2'd0;
  localparam logic [1:0] PL_AND_COMP = 2'd1;
  localparam logic [1:0] PL_OR       = 2'd2;

  // Crosspoint connected?  Initial state: all 1 (fuse) or all 0 (anti-fuse).
  logic [N_TERMS-1:0][N_IN-1:0]  conn_true;
  logic [N_TERMS-1:0][N_IN-1:0]  conn_comp;
  logic [N_OUT-1:0][N_TERMS-1:0] conn_or;

  always_ff @(posedge clk) begin
    if (rst) begin
      conn_true <= {N_TERMS * N_IN{~ANTIFUSE}};
      conn_comp <= {N_TERMS * N_IN{~ANTIFUSE}};
      conn_or   <= {N_OUT * N_TERMS{~ANTIFUSE}};
    end else if (prog_en) begin
      // programming only ever moves a crosspoint away from its initial state
      unique case (prog_plane)
        PL_AND_TRUE:
          if (32'(prog_row) < N_TERMS && 32'(prog_col) < N_IN)
            conn_true[prog_row][prog_col] <= ANTIFUSE;
        PL_AND_COMP:
          if (32'(prog_row) < N_TERMS && 32'(prog_col) < N_IN)
            conn_comp[prog_row][prog_col] <= ANTIFUSE;
        PL_OR:
          if (32'(prog_row) < N_OUT && 32'(prog_col) < N_TERMS)
            conn_or[prog_row][prog_col] <= ANTIFUSE;
        default: ;
      endcase
    end
  end

  // AND plane
  always_comb begin
    for (int t = 0; t < N_TERMS; t++) begin
      terms[t] = &((in | ~conn_true[t]) & (~in | ~conn_comp[t]));
    end
  end

  // OR plane
  always_comb begin
    for (int o = 0; o < N_OUT; o++) begin
      out[o] = |(terms & conn_or[o]);
    end
  end

  // A programming request must name an existing plane.
  a_plane_valid: assert property (@(posedge clk) disable iff (rst)
                                  prog_en |-> prog_plane != 2'd3)
    else $error("pla_fuse: programming request on undefined plane 3");
endmodule
