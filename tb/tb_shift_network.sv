// tb_shift_network: exhaustive test of the 8-bit shift network: every data
// word, shift amount, rev, rot and fill value. With rev = 0 the network must
// move the word k places towards bit 0, filling from the other end with the
// wrapped bits (rot = 1) or the fill bit (rot = 0). With rev = 1 it must do
// the same to the mirrored word. Expected values come from the behavioural
// reference (right shift with the chosen fill). Also checks that rev passes
// through and that the whole output (y, garbage, rev_o, plus the control
// inputs the gates hand back) never maps two inputs to one output, by
// checking that y and garbage together determine x for a fixed control.
module tb_shift_network;
  import rbs_ref_pkg::*;
  localparam int N = 8, KW = 3;
  localparam int GW = rbs_pkg::net_garbage(N);
  int checks = 0, failures = 0;
  logic [N-1:0] x, y, exp_y, src;
  logic [KW-1:0] k;
  logic rev, rot, fill, rev_o;
  logic [GW-1:0] garbage;
  logic [N+GW-1:0] seen_out [int];

  shift_network #(.N(N)) dut (.x, .k, .rev, .rot, .fill, .y, .rev_o, .garbage);

  initial begin
    for (int c = 0; c < 64; c++) begin
      {k, rev, rot, fill} = 6'(c);
      seen_out.delete();
      for (int d = 0; d < 256; d++) begin
        x = N'(d);
        #1;
        src = rev ? N'(ref_mirror(64'(x), N)) : x;
        // right shift by k; vacated top bits take wrap or fill
        exp_y = N'(ref_shift(64'(src), N, int'(k), 1'b0, rot ? 2'b10 : 2'b00));
        if (!rot && fill) for (int i = N - int'(k); i < N; i++) exp_y[i] = 1'b1;
        checks++;
        if (y !== exp_y || rev_o !== rev) begin
          failures++;
          if (failures < 10)
            $display("FAIL x=%b k=%0d rev=%b rot=%b fill=%b y=%b exp=%b", x, k, rev, rot, fill, y, exp_y);
        end
        seen_out[d] = {y, garbage};
      end
      // one-to-one: no two data words give the same {y, garbage}
      checks++;
      for (int a = 0; a < 256; a++)
        for (int b = a + 1; b < 256; b++)
          if (seen_out[a] == seen_out[b]) begin
            failures++;
            $display("FAIL outputs of %0d and %0d coincide (k=%0d rev=%b rot=%b fill=%b)", a, b, k, rev, rot, fill);
            a = 256; break;
          end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
