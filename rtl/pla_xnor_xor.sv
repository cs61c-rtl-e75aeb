// pla_xnor_xor: the four-input PLA example in short-hand notation, programmed.
//
//   F0 = AB + A'B'   (A XNOR B)
//   F1 = CD' + C'D   (C XOR D)
// Four product terms (AB, A'B', CD', C'D) on an array of four OR gates;
// the two OR gates the example leaves unused have no term connected and
// are not brought out. Combinational.
module pla_xnor_xor (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic f0,
  output logic f1
);
  logic [3:0] terms;
  logic [3:0] f;

  pla #(
    .N_IN    (4),
    .N_TERMS (4),
    .N_OUT   (4),
    // inputs {A, B, C, D}; terms t3 = C'D, t2 = CD', t1 = A'B', t0 = AB
    .AND_TRUE({4'b0001, 4'b0010, 4'b0000, 4'b1100}),
    .AND_COMP({4'b0010, 4'b0001, 4'b1100, 4'b0000}),
    // OR gates 3..0; gate 0 = F0, gate 1 = F1, gates 2 and 3 unprogrammed
    .OR_PLANE({4'b0000, 4'b0000, 4'b1100, 4'b0011})
  ) u_pla (
    .in   ({a, b, c, d}),
    .terms(terms),
    .out  (f)
  );

  assign f0 = f[0];
  assign f1 = f[1];
endmodule
