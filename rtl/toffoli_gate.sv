// toffoli_gate: the 3x3 reversible Toffoli (controlled-controlled-NOT) gate.
//   P = A, Q = B, R = C ^ (A & B).
// With C tied to 0 it forms the AND of A and B without losing A or B.
// Purely combinational. The gate is named by the design as one of its
// building blocks; its truth table is the standard one.
module toffoli_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  always_comb begin
    p = a;
    q = b;
    r = c ^ (a & b);
  end
endmodule
