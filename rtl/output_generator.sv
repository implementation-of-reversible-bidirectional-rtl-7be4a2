// output_generator: forms the final word and the garbage-output bus.
// A dir_reverser mirrors the shift network's result back when rev is 1 (left
// shift), giving OUT. The garbage bits of the control unit and of the shift
// network are gathered into one bus, control unit garbage in the top bits.
// Combinational. The output generator and its garbage outputs are the
// design's blocks; the mirroring and the bus order are this design's own.
module output_generator #(
  parameter int unsigned N  = 8,
  parameter int unsigned NG = rbs_pkg::net_garbage(N),
  parameter int unsigned GW = rbs_pkg::CTRL_GARBAGE + NG
) (
  input  logic [N-1:0]  y,
  input  logic          rev,
  input  logic [rbs_pkg::CTRL_GARBAGE-1:0] ctrl_garbage,
  input  logic [NG-1:0] net_garbage,
  output logic [N-1:0]  data_out,
  output logic [GW-1:0] garbage
);
  logic rev_o;

  dir_reverser #(.N(N)) u_unmirror (.ctl(rev), .x(y), .y(data_out), .ctl_o(rev_o));

  assign garbage = {ctrl_garbage, net_garbage};

  logic unused_ok;
  assign unused_ok = rev_o;
endmodule
