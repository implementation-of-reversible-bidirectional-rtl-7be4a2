// rev_barrel_shifter: N-bit reversible bidirectional barrel shifter.
// Shifts or rotates a word by k = 0..N-1 places, left or right, in one pass
// through log2(N) stages of reversible gates, and supports logical shift
// (zero fill), arithmetic shift (sign fill on right shifts) and rotate.
// Data path:
//   input_unit (register) -> control_unit (DIR/MODE decode, fill bit)
//   -> shift_network (mirror for left shifts, log2(N) Fredkin stages)
//   -> output_generator (mirror back, gather garbage) -> output_unit (register)
// Interface: present data_in, k, dir (1 = left) and mode (rbs_pkg::mode_e)
// with in_valid high for one clock. Timing: the operand is captured on that
// edge, the whole shift happens combinationally in the next cycle, and on the
// following edge data_out and the garbage bus are captured and out_valid goes
// high: a latency of two clock edges and a throughput of one operation per
// clock. Asynchronous active-low reset.
// The block structure (input unit, control unit, shift control logic with
// log2 n stages, output generator with garbage outputs, output register) and
// the gate families follow the design; N = 8, the MODE/DIR codes, the valid
// handshake and the registering of the garbage bus are this design's choices.
// N must be a power of two.
module rev_barrel_shifter #(
  parameter int unsigned N  = 8,
  parameter int unsigned KW = $clog2(N),
  parameter int unsigned GW = rbs_pkg::total_garbage(N)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [N-1:0]   data_in,
  input  logic [KW-1:0]  k,
  input  logic           dir,
  input  logic [1:0]     mode,
  output logic           out_valid,
  output logic [N-1:0]   data_out,
  output logic [GW-1:0]  garbage
);
  localparam int unsigned NG = rbs_pkg::net_garbage(N);

  if (N < 2 || (N & (N - 1)) != 0 || KW != $clog2(N)) begin : g_bad_n
    $error("rev_barrel_shifter: N must be a power of two >= 2 and KW = log2(N)");
  end

  logic                 r_valid;
  logic [N-1:0]         r_data;
  logic [KW-1:0]        r_k;
  logic                 r_dir;
  rbs_pkg::mode_e       r_mode;

  logic                 rev, rot, fill, rev_net;
  logic [rbs_pkg::CTRL_GARBAGE-1:0] ctrl_g;
  logic [N-1:0]         y, out_comb;
  logic [NG-1:0]        net_g;
  logic [GW-1:0]        all_g;

  input_unit #(.N(N), .KW(KW)) u_in (
    .clk, .rst_n, .in_valid,
    .data_in, .k_in(k), .dir_in(dir), .mode_in(rbs_pkg::mode_e'(mode)),
    .q_valid(r_valid), .q_data(r_data), .q_k(r_k), .q_dir(r_dir), .q_mode(r_mode)
  );

  control_unit u_ctrl (
    .dir(r_dir), .mode(r_mode), .msb(r_data[N-1]),
    .rev, .rot, .fill, .garbage(ctrl_g)
  );

  shift_network #(.N(N), .KW(KW), .GW(NG)) u_net (
    .x(r_data), .k(r_k), .rev, .rot, .fill,
    .y, .rev_o(rev_net), .garbage(net_g)
  );

  output_generator #(.N(N), .NG(NG), .GW(GW)) u_gen (
    .y, .rev(rev_net), .ctrl_garbage(ctrl_g), .net_garbage(net_g),
    .data_out(out_comb), .garbage(all_g)
  );

  output_unit #(.N(N), .GW(GW)) u_out (
    .clk, .rst_n, .d_valid(r_valid), .d_data(out_comb), .d_garbage(all_g),
    .q_valid(out_valid), .q_data(data_out), .q_garbage(garbage)
  );

endmodule
