// feynman_gate: the 2x2 reversible Feynman (controlled-NOT) gate.
//   P = A, Q = A ^ B.
// With B tied to 0 it copies A (fan-out); with B tied to 1 it inverts A.
// Purely combinational. The gate is named by the design as one of its
// building blocks; its truth table is the standard one.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  always_comb begin
    p = a;
    q = a ^ b;
  end
endmodule
