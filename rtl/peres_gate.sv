// peres_gate: the 3x3 reversible Peres gate (a Toffoli followed by a Feynman).
//   P = A, Q = A ^ B, R = C ^ (A & B).
// With C tied to 0, R is the AND of A and B and Q their XOR.
// Purely combinational. The gate is named by the design as one of its
// building blocks; its truth table is the standard one.
module peres_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  always_comb begin
    p = a;
    q = a ^ b;
    r = c ^ (a & b);
  end
endmodule
