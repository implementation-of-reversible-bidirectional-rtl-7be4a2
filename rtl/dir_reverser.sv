// dir_reverser: mirrors an N-bit word (bit i <-> bit N-1-i) when ctl is 1 and
// passes it unchanged when ctl is 0. Each mirrored pair goes through one
// Fredkin gate whose control is ctl, so the layer is reversible and leaves no
// garbage; for odd N the middle bit passes straight through. The control is
// threaded from gate to gate through each Fredkin's P output and leaves on
// ctl_o. Combinational. Used before the shift stages and again after them so
// that a left shift is done as a right shift of the mirrored word; that
// arrangement is this design's own choice.
module dir_reverser #(
  parameter int unsigned N = 8
) (
  input  logic         ctl,
  input  logic [N-1:0] x,
  output logic [N-1:0] y,
  output logic         ctl_o
);
  localparam int unsigned PAIRS = N / 2;

  logic [PAIRS:0] c;
  assign c[0] = ctl;

  for (genvar i = 0; i < PAIRS; i++) begin : g_pair
    fredkin_gate u_swap (
      .a(c[i]), .b(x[i]), .c(x[N-1-i]),
      .p(c[i+1]), .q(y[i]), .r(y[N-1-i])
    );
  end

  if (N % 2 == 1) begin : g_mid
    assign y[PAIRS] = x[PAIRS];
  end

  assign ctl_o = c[PAIRS];
endmodule
