// tb_input_unit: clocked test of the input register. After reset all fields
// must read zero. Then random operands are offered with in_valid randomly high
// or low; a scoreboard tracks what the register should hold (the last operand
// offered with in_valid high) and checks it, and q_valid, after every edge.
module tb_input_unit;
  import rbs_pkg::*;
  localparam int N = 8, KW = 3;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [N-1:0] data_in = '0, q_data, e_data;
  logic [KW-1:0] k_in = '0, q_k, e_k;
  logic dir_in = 0, q_dir, e_dir, q_valid, e_valid;
  mode_e mode_in = MODE_LOGICAL, q_mode, e_mode;

  input_unit #(.N(N), .KW(KW)) dut (.clk, .rst_n, .in_valid, .data_in, .k_in,
    .dir_in, .mode_in, .q_valid, .q_data, .q_k, .q_dir, .q_mode);

  always #5 clk = ~clk;

  task automatic check();
    checks++;
    if (q_valid !== e_valid || q_data !== e_data || q_k !== e_k ||
        q_dir !== e_dir || q_mode !== e_mode) begin
      failures++;
      $display("FAIL got v=%b d=%h k=%0d dir=%b m=%0d exp v=%b d=%h k=%0d dir=%b m=%0d",
               q_valid, q_data, q_k, q_dir, q_mode, e_valid, e_data, e_k, e_dir, e_mode);
    end
  endtask

  initial begin
    {e_valid, e_data, e_k, e_dir} = '0;
    e_mode = MODE_LOGICAL;
    #12;
    check();
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      in_valid = ($urandom % 3) != 0;
      data_in  = N'($urandom);
      k_in     = KW'($urandom);
      dir_in   = 1'($urandom);
      mode_in  = mode_e'(2'($urandom));
      e_valid = in_valid;
      if (in_valid) begin
        e_data = data_in; e_k = k_in; e_dir = dir_in; e_mode = mode_in;
      end
      @(posedge clk);
      #1;
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
