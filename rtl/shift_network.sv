// shift_network: the shift control logic and stage-wise shift network.
// A dir_reverser mirrors the word when rev is 1, then log2(N) shift_stage
// instances move it towards bit 0 by 1, 2, 4, ... places, each stage enabled
// by one bit of k. The result, still mirrored for a left shift, leaves on y;
// the output generator mirrors it back. Right shift by k, and left shift by k
// as mirror / right shift / mirror, both come out of the same stages.
// garbage concatenates the stages' garbage, stage 0 in the low bits.
// Combinational. The log2(n) stages of Fredkin controlled swaps, each driven
// by one bit of k, are the design's; doing the left shift by mirroring is
// this design's own choice.
module shift_network #(
  parameter int unsigned N  = 8,
  parameter int unsigned KW = $clog2(N),
  parameter int unsigned GW = rbs_pkg::net_garbage(N)
) (
  input  logic [N-1:0]  x,
  input  logic [KW-1:0] k,
  input  logic          rev,
  input  logic          rot,
  input  logic          fill,
  output logic [N-1:0]  y,
  output logic          rev_o,
  output logic [GW-1:0] garbage
);
  // Garbage offset of stage j: sum over earlier stages of N + 2^i.
  function automatic int unsigned g_off(int unsigned j);
    return N * j + ((1 << j) - 1);
  endfunction

  logic [N-1:0] w [KW+1];
  logic [KW:0]  rot_c, fill_c;
  logic [KW-1:0] k_pass;

  dir_reverser #(.N(N)) u_mirror (.ctl(rev), .x(x), .y(w[0]), .ctl_o(rev_o));

  assign rot_c[0]  = rot;
  assign fill_c[0] = fill;

  for (genvar j = 0; j < KW; j++) begin : g_stage
    localparam int unsigned S = 1 << j;
    shift_stage #(.N(N), .S(S)) u_stage (
      .s(k[j]), .rot(rot_c[j]), .fill(fill_c[j]), .x(w[j]), .y(w[j+1]),
      .s_o(k_pass[j]), .rot_o(rot_c[j+1]), .fill_o(fill_c[j+1]),
      .garbage(garbage[g_off(j) +: N + S])
    );
  end

  assign y = w[KW];

  // The shift-amount bits, rot and fill are handed back unchanged by the last
  // gate of each chain; they are copies of inputs and are not brought out.
  logic unused_ok;
  assign unused_ok = ^{k_pass, rot_c[KW], fill_c[KW]};
endmodule
