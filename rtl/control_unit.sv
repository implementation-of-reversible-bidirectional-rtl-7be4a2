// control_unit: turns DIR and MODE into the three signals the shift network
// needs, using only reversible gates.
//   rev  - 1 when the word is to be mirrored (left shifts are done as right
//          shifts of the bit-reversed word); it is DIR itself.
//   rot  - 1 for rotate; MODE[1].
//   fill - the bit shifted into vacated positions when not rotating: the
//          sign bit for an arithmetic right shift, 0 otherwise.
// Gate network (all ancilla inputs are constants):
//   Feynman(MODE[1], 1)           -> nm1 = ~MODE[1]
//   Toffoli(MODE[0], nm1, 0)      -> arith = MODE[0] & ~MODE[1]
//   Feynman(DIR, 1)               -> right = ~DIR
//   Peres(arith, right, 0)        -> sign_en = arith & right, x = arith ^ right
//   Toffoli(sign_en, msb, 0)      -> fill = sign_en & msb
// The four intermediate values {nm1, arith, x, sign_en} leave as garbage.
// Combinational. That DIR and MODE are decoded through Feynman and Toffoli
// gates is the design's; the exact network and the use of a Peres gate for
// the direction/mode product are this design's own choices.
module control_unit (
  input  logic            dir,
  input  rbs_pkg::mode_e  mode,
  input  logic            msb,
  output logic            rev,
  output logic            rot,
  output logic            fill,
  output logic [rbs_pkg::CTRL_GARBAGE-1:0] garbage
);
  logic m1_p, nm1, m0_p, nm1_p, arith;
  logic dir_p, right, arith_p, a_xor_r, sign_en;
  logic sign_en_p, msb_p;
  logic [1:0] m;

  assign m = mode;

  feynman_gate u_not_m1  (.a(m[1]), .b(1'b1), .p(m1_p), .q(nm1));
  toffoli_gate u_arith   (.a(m[0]), .b(nm1), .c(1'b0), .p(m0_p), .q(nm1_p), .r(arith));
  feynman_gate u_not_dir (.a(dir), .b(1'b1), .p(dir_p), .q(right));
  peres_gate   u_sign_en (.a(arith), .b(right), .c(1'b0), .p(arith_p), .q(a_xor_r), .r(sign_en));
  toffoli_gate u_fill    (.a(sign_en), .b(msb), .c(1'b0), .p(sign_en_p), .q(msb_p), .r(fill));

  assign rev     = dir_p;
  assign rot     = m1_p;
  assign garbage = {nm1_p, arith_p, a_xor_r, sign_en_p};

  // m0_p and msb_p are the unchanged control inputs handed back by their
  // gates; they carry no new information and are not brought out.
  logic unused_ok;
  assign unused_ok = m0_p ^ msb_p;
endmodule
