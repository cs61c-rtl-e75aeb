// pla_shared_terms: the shared-product-term PLA example, programmed.
//
// Four functions of three inputs built from five product terms, two of which
// (AB and B'C') feed two outputs each:
//   F0 = A + B'C'   F1 = AC' + AB   F2 = B'C' + AB   F3 = B'C + A
// Personality matrix (1 = true input, 0 = complemented input, - = unused;
// on the output side 1 = term connected):
//   term  A B C | F0 F1 F2 F3
//   AB    1 1 - |  0  1  1  0
//   B'C   - 0 1 |  0  0  0  1
//   AC'   1 - 0 |  0  1  0  0
//   B'C'  - 0 0 |  1  0  1  0
//   A     1 - - |  1  0  0  1
// The matrix is set here explicitly on a generic pla. Combinational.
module pla_shared_terms (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic f0,
  output logic f1,
  output logic f2,
  output logic f3
);
  logic [4:0] terms;
  logic [3:0] f;

  pla #(
    .N_IN    (3),
    .N_TERMS (5),
    .N_OUT   (4),
    // inputs {A, B, C}; terms listed t4 (A) down to t0 (AB)
    .AND_TRUE({3'b100, 3'b000, 3'b100, 3'b001, 3'b110}),
    .AND_COMP({3'b000, 3'b011, 3'b001, 3'b010, 3'b000}),
    // outputs F3 down to F0, each a mask over terms t4..t0
    .OR_PLANE({5'b10010, 5'b01001, 5'b00101, 5'b11000})
  ) u_pla (
    .in   ({a, b, c}),
    .terms(terms),
    .out  (f)
  );

  assign {f3, f2, f1, f0} = f;
endmodule
