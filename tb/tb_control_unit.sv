// tb_control_unit: exhaustive test of control_unit over DIR, all four MODE
// codes and the sign bit. rev must equal DIR, rot must be 1 exactly for the
// two rotate codes, and fill must be the sign bit only for an arithmetic
// right shift. The garbage bits are compared with the intermediate values
// the gate network is documented to leave: {~MODE[1], arith, arith^~DIR,
// arith&~DIR}.
module tb_control_unit;
  import rbs_pkg::*;
  int checks = 0, failures = 0;
  logic dir, msb, rev, rot, fill;
  mode_e mode;
  logic [CTRL_GARBAGE-1:0] garbage;
  logic exp_rot, exp_fill, arith, right;
  logic [CTRL_GARBAGE-1:0] exp_g;

  control_unit dut (.dir, .mode, .msb, .rev, .rot, .fill, .garbage);

  initial begin
    for (int v = 0; v < 16; v++) begin
      {dir, msb} = 2'(v >> 2);
      mode = mode_e'(v[1:0]);
      #1;
      arith    = (v[1:0] == 2'b01);
      right    = !dir;
      exp_rot  = (v[1:0] == 2'b10) || (v[1:0] == 2'b11);
      exp_fill = arith && right && msb;
      exp_g    = {~v[1], arith, arith ^ right, arith & right};
      checks++;
      if (rev !== dir || rot !== exp_rot || fill !== exp_fill) begin
        failures++;
        $display("FAIL dir=%b mode=%b msb=%b -> rev=%b rot=%b fill=%b", dir, v[1:0], msb, rev, rot, fill);
      end
      checks++;
      if (garbage !== exp_g) begin
        failures++;
        $display("FAIL garbage %b exp %b", garbage, exp_g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
