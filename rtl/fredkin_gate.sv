// fredkin_gate: the 3x3 reversible Fredkin (controlled-swap) gate.
//   P = A, Q = A ? C : B, R = A ? B : C.
// B and C are exchanged when the control A is 1. Used on its own, Q is a 2:1
// multiplexer and R its garbage; used on a pair of data bits, it swaps them
// with no garbage at all. Purely combinational. The design names the Fredkin
// gate as its controlled-swap element; its truth table is the standard one.
module fredkin_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  always_comb begin
    p = a;
    q = (~a & b) | (a & c);
    r = (~a & c) | (a & b);
  end
endmodule
