// tb_rev_barrel_shifter: end-to-end test of the shifter at its default size
// (N = 8, no parameter overrides). Every data word is sent with every shift
// amount, both directions and all four MODE codes (16384 operations), back to
// back with random idle cycles in between. For each result it checks:
//   - data_out against the behavioural reference, and the control unit's four
//     garbage bits against their definition;
//   - that it arrives exactly two clock edges after its operand, with
//     out_valid high for one cycle per operation and the output held while
//     idle;
//   - that under any one {k, DIR, MODE} no two data words give the same
//     {data_out, garbage}, i.e. the shifter loses no information.
// It also counts how often each mechanism was exercised (left and right
// shift, zero shift, logical zero fill, arithmetic sign fill, rotate
// wrap-around, idle cycles holding the output) and counts a failure for any
// that never happened.
module tb_rev_barrel_shifter;
  import rbs_ref_pkg::*;
  localparam int N = 8, KW = 3;
  localparam int GW = rbs_pkg::total_garbage(N);

  typedef struct {
    logic [N-1:0] exp;
    logic [3:0]   exp_cg;  // control-unit garbage, top four garbage bits
    logic [5:0]   ctl;     // {mode, dir, k} of the operation
    longint       due;
  } pend_t;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [N-1:0] data_in = '0, data_out, last_out;
  logic [KW-1:0] k = '0;
  logic dir = 0;
  logic [1:0] mode = '0;
  logic out_valid;
  logic [GW-1:0] garbage;
  longint cyc = 0;
  pend_t q [$];
  // {ctl, data_out, garbage} of every result seen so far
  bit seen [logic [6+N+GW-1:0]];
  int n_left = 0, n_right = 0, n_zero = 0, n_logic_fill = 0, n_sign_fill = 0,
      n_wrap = 0, n_idle_hold = 0, n_results = 0, n_sent = 0;

  rev_barrel_shifter dut (.clk, .rst_n, .in_valid, .data_in, .k, .dir, .mode,
                          .out_valid, .data_out, .garbage);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // Result checker: runs just after every edge.
  always @(posedge clk) begin
    #1;
    if (rst_n) begin
      if (out_valid) begin
        n_results++;
        checks++;
        if (q.size() == 0) begin
          failures++;
          $display("FAIL unexpected out_valid at cycle %0d", cyc);
        end else begin
          pend_t p;
          p = q.pop_front();
          if (p.due != cyc || data_out !== p.exp || garbage[GW-1 -: 4] !== p.exp_cg) begin
            failures++;
            if (failures < 10)
              $display("FAIL cycle %0d (due %0d): out=%b exp=%b", cyc, p.due, data_out, p.exp);
          end
          checks++;
          if (seen.exists({p.ctl, data_out, garbage})) begin
            failures++;
            if (failures < 10) $display("FAIL two words give the same output and garbage (ctl=%b)", p.ctl);
          end
          seen[{p.ctl, data_out, garbage}] = 1'b1;
        end
        last_out = data_out;
      end else begin
        checks++;
        if (q.size() != 0 && q[0].due <= cyc) begin
          failures++;
          $display("FAIL result due at cycle %0d missing", q[0].due);
        end
        if (n_results > 0) begin
          n_idle_hold++;
          if (data_out !== last_out) begin
            failures++;
            $display("FAIL output changed while idle");
          end
        end
      end
    end
  end

  task automatic send(logic [N-1:0] d, int kk, bit l, logic [1:0] m);
    pend_t p;
    @(negedge clk);
    in_valid = 1; data_in = d; k = KW'(kk); dir = l; mode = m;
    p.exp = N'(ref_shift(64'(d), N, kk, l, m));
    // {~MODE[1], arith, arith ^ right, arith & right}
    p.exp_cg = {~m[1], m == 2'b01, (m == 2'b01) ^ !l, (m == 2'b01) && !l};
    p.ctl = {m, l, KW'(kk)};
    p.due = cyc + 2;  // captured at edge cyc+1, result registered at edge cyc+2
    q.push_back(p);
    n_sent++;
    if (l) n_left++; else n_right++;
    if (kk == 0) n_zero++;
    if (kk != 0 && !m[1] && !(m == 2'b01 && !l)) n_logic_fill++;
    if (kk != 0 && m == 2'b01 && !l && d[N-1]) n_sign_fill++;
    if (kk != 0 && m[1] && p.exp != N'(ref_shift(64'(d), N, kk, l, 2'b00))) n_wrap++;
    if ($urandom % 8 == 0) begin
      @(negedge clk);
      in_valid = 0;
      data_in = N'($urandom);
    end
  endtask

  initial begin
    #22 rst_n = 1;
    for (int m = 0; m < 4; m++)
      for (int l = 0; l < 2; l++)
        for (int kk = 0; kk < N; kk++)
          for (int d = 0; d < (1 << N); d++)
            send(N'(d), kk, l[0], 2'(m));
    @(negedge clk);
    in_valid = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (q.size() != 0 || n_results != n_sent) begin
      failures++;
      $display("FAIL sent %0d results %0d pending %0d", n_sent, n_results, q.size());
    end
    $display("mechanisms: left=%0d right=%0d zero_shift=%0d zero_fill=%0d sign_fill=%0d wrap=%0d idle_hold=%0d",
             n_left, n_right, n_zero, n_logic_fill, n_sign_fill, n_wrap, n_idle_hold);
    checks++; if (n_left == 0)       begin failures++; $display("FAIL no left shift");  end
    checks++; if (n_right == 0)      begin failures++; $display("FAIL no right shift"); end
    checks++; if (n_zero == 0)       begin failures++; $display("FAIL no zero shift");  end
    checks++; if (n_logic_fill == 0) begin failures++; $display("FAIL no zero fill");   end
    checks++; if (n_sign_fill == 0)  begin failures++; $display("FAIL no sign fill");   end
    checks++; if (n_wrap == 0)       begin failures++; $display("FAIL no wrap-around"); end
    checks++; if (n_idle_hold == 0)  begin failures++; $display("FAIL no idle cycle");  end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
