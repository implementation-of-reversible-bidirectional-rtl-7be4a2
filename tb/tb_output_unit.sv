// tb_output_unit: clocked test of the output register at N = 8. After reset
// everything reads zero; then random words and garbage are offered with
// d_valid random, and after each edge the register must hold the last word
// offered with d_valid high, and q_valid must equal the d_valid just sampled.
module tb_output_unit;
  localparam int N = 8;
  localparam int GW = rbs_pkg::total_garbage(N);
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, d_valid = 0, q_valid, e_valid;
  logic [N-1:0] d_data = '0, q_data, e_data;
  logic [GW-1:0] d_garbage = '0, q_garbage, e_garbage;

  output_unit #(.N(N)) dut (.clk, .rst_n, .d_valid, .d_data, .d_garbage,
                            .q_valid, .q_data, .q_garbage);

  always #5 clk = ~clk;

  task automatic check();
    checks++;
    if (q_valid !== e_valid || q_data !== e_data || q_garbage !== e_garbage) begin
      failures++;
      $display("FAIL got v=%b d=%h g=%h exp v=%b d=%h g=%h",
               q_valid, q_data, q_garbage, e_valid, e_data, e_garbage);
    end
  endtask

  initial begin
    e_valid = 0; e_data = '0; e_garbage = '0;
    #12;
    check();
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      d_valid   = 1'($urandom);
      d_data    = N'($urandom);
      d_garbage = GW'({$urandom, $urandom});
      e_valid = d_valid;
      if (d_valid) begin e_data = d_data; e_garbage = d_garbage; end
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
