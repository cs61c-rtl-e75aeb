// pla: programmable logic array, a two-level sum-of-products block.
//
// Every input is available in true and complemented form. The AND plane
// forms N_TERMS product terms; term t connects to the true form of input i
// when AND_TRUE[t][i] is 1 and to the complemented form when AND_COMP[t][i]
// is 1 (a term connected to neither form of an input does not depend on it;
// one connected to both is constantly 0, the state of an unprogrammed
// array). The OR plane sums terms into N_OUT outputs: output o includes
// term t when OR_PLANE[o][t] is 1. Terms are shared by any number of
// outputs, which is what makes a PLA smaller than one sum of products per
// output.
//
// The "programming" (which connections are kept) is given by the three
// parameters, i.e. the array after its unwanted connections have been
// removed. The defaults are the 3-input, 5-term, 4-output example
//   F0 = A + B'C'   F1 = AC' + AB   F2 = B'C' + AB   F3 = B'C + A
// with in = {A, B, C}, terms t0..t4 = AB, B'C, AC', B'C', A and
// out = {F3, F2, F1, F0}. Purely combinational.
module pla #(
  parameter int unsigned N_IN    = 3,
  parameter int unsigned N_TERMS = 5,
  parameter int unsigned N_OUT   = 4,
  //                                            t4      t3      t2      t1      t0
  parameter logic [N_TERMS-1:0][N_IN-1:0] AND_TRUE = {3'b100, 3'b000, 3'b100, 3'b001, 3'b110},
  parameter logic [N_TERMS-1:0][N_IN-1:0] AND_COMP = {3'b000, 3'b011, 3'b001, 3'b010, 3'b000},
  //                                            F3        F2        F1        F0
  parameter logic [N_OUT-1:0][N_TERMS-1:0] OR_PLANE = {5'b10010, 5'b01001, 5'b00101, 5'b11000}
) (
  input  logic [N_IN-1:0]    in,
  output logic [N_TERMS-1:0] terms,  // product-term lines, visible for test
  output logic [N_OUT-1:0]   out
);
  // AND plane
  always_comb begin
    for (int t = 0; t < N_TERMS; t++) begin
      terms[t] = &((in | ~AND_TRUE[t]) & (~in | ~AND_COMP[t]));
    end
  end

  // OR plane
  always_comb begin
    for (int o = 0; o < N_OUT; o++) begin
      out[o] = |(terms & OR_PLANE[o]);
    end
  end
endmodule
