// tb_rev_barrel_shifter_wide: the shifter at other word widths. Instances at
// N = 4, 16, 32 and 64 each receive random words with every shift amount,
// both directions and all MODE codes, one operation per clock; each result is
// checked against the behavioural reference two edges after it was sent.
module tb_rev_barrel_shifter_wide;
  import rbs_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // Drives one instance of width W and checks its results.
  bit done [4] = '{default: 1'b0};

  for (genvar g = 0; g < 4; g++) begin : g_w
    localparam int W  = (g == 0) ? 4 : (g == 1) ? 16 : (g == 2) ? 32 : 64;
    localparam int KW = $clog2(W);
    localparam int GW = rbs_pkg::total_garbage(W);
    logic in_valid = 0, out_valid, dir = 0;
    logic [W-1:0] data_in = '0, data_out;
    logic [KW-1:0] k = '0;
    logic [1:0] mode = '0;
    logic [GW-1:0] garbage;
    logic [W-1:0] exp_q [$];

    rev_barrel_shifter #(.N(W)) dut (.clk, .rst_n, .in_valid, .data_in, .k, .dir,
                                     .mode, .out_valid, .data_out, .garbage);

    initial begin
      @(posedge rst_n);
      for (int t = 0; t < 4000; t++) begin
        @(negedge clk);
        in_valid = 1;
        data_in = W'({$urandom, $urandom});
        k = KW'(t % W);
        dir = t[0];
        mode = 2'(t >> 1);
        exp_q.push_back(W'(ref_shift(64'(data_in), W, int'(k), dir, mode)));
        @(posedge clk);
        #1;
        if (t > 0) begin
          checks++;
          if (!out_valid || data_out !== exp_q[0]) begin
            failures++;
            if (failures < 10) $display("FAIL W=%0d out=%h exp=%h", W, data_out, exp_q[0]);
          end
          void'(exp_q.pop_front());
        end
      end
      done[g] = 1;
    end
  end

  initial begin
    #22 rst_n = 1;
    wait (done[0] && done[1] && done[2] && done[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
