// shift_stage: one stage of the reversible shift network. When s is 1 it moves
// the word S places towards bit 0 (y[i] = x[i+S]); when s is 0 it passes the
// word unchanged. The S top positions, which have no x[i+S], take either the
// bit that fell off the bottom (rot = 1, rotate) or the fill bit (rot = 0).
// Gates, all ancillas constant 0:
//   - one Feynman per bit copies x[i], one copy staying at position i and one
//     feeding position i-S (mod N);
//   - one Feynman per wrapped position copies the fill bit;
//   - one Fredkin per wrapped position picks the wrapped bit or the fill bit
//     (control rot);
//   - one Fredkin per bit picks x[i] or its source (control s).
// Controls s, rot and fill are threaded through their gates and leave on the
// *_o ports. garbage holds the R outputs of the Fredkins: [N-1:0] for the
// per-bit selectors, [N+S-1:N] for the wrap selectors. Combinational.
// The stage built from Fredkin controlled swaps is the design's; the exact
// gate arrangement is this design's own choice.
module shift_stage #(
  parameter int unsigned N = 8,
  parameter int unsigned S = 1
) (
  input  logic           s,
  input  logic           rot,
  input  logic           fill,
  input  logic [N-1:0]   x,
  output logic [N-1:0]   y,
  output logic           s_o,
  output logic           rot_o,
  output logic           fill_o,
  output logic [N+S-1:0] garbage
);
  logic [N-1:0] xa, xb, src;
  logic [N:0]   s_c;
  logic [S:0]   rot_c, fill_c;
  logic [S-1:0] fill_cp;

  assign s_c[0]    = s;
  assign rot_c[0]  = rot;
  assign fill_c[0] = fill;

  for (genvar i = 0; i < N; i++) begin : g_bit
    feynman_gate u_fan (.a(x[i]), .b(1'b0), .p(xa[i]), .q(xb[i]));

    if (i + S < N) begin : g_direct
      assign src[i] = xb[i+S];
    end else begin : g_wrap
      localparam int unsigned W = i + S - N;
      feynman_gate u_fill_fan (.a(fill_c[W]), .b(1'b0), .p(fill_c[W+1]), .q(fill_cp[W]));
      fredkin_gate u_wrap (
        .a(rot_c[W]), .b(fill_cp[W]), .c(xb[W]),
        .p(rot_c[W+1]), .q(src[i]), .r(garbage[N+W])
      );
    end

    fredkin_gate u_sel (
      .a(s_c[i]), .b(xa[i]), .c(src[i]),
      .p(s_c[i+1]), .q(y[i]), .r(garbage[i])
    );
  end

  assign s_o    = s_c[N];
  assign rot_o  = rot_c[S];
  assign fill_o = fill_c[S];
endmodule
