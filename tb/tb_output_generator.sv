// tb_output_generator: random test of the output generator at N = 8. With
// rev = 1 data_out must be the bit-mirror of y, with rev = 0 y itself; the
// garbage bus must be the control unit's garbage above the network's.
module tb_output_generator;
  import rbs_ref_pkg::*;
  localparam int N = 8;
  localparam int CG = rbs_pkg::CTRL_GARBAGE;
  localparam int NG = rbs_pkg::net_garbage(N);
  int checks = 0, failures = 0;
  logic [N-1:0] y, data_out, exp_out;
  logic rev;
  logic [CG-1:0] cg;
  logic [NG-1:0] ng;
  logic [CG+NG-1:0] garbage;

  output_generator #(.N(N)) dut (.y, .rev, .ctrl_garbage(cg), .net_garbage(ng),
                                 .data_out, .garbage);

  initial begin
    for (int t = 0; t < 2000; t++) begin
      y = N'($urandom); rev = 1'($urandom);
      cg = CG'($urandom); ng = NG'({$urandom, $urandom});
      #1;
      exp_out = rev ? N'(ref_mirror(64'(y), N)) : y;
      checks++;
      if (data_out !== exp_out) begin
        failures++;
        $display("FAIL y=%b rev=%b out=%b exp=%b", y, rev, data_out, exp_out);
      end
      checks++;
      if (garbage !== {cg, ng}) begin
        failures++;
        $display("FAIL garbage %h exp %h", garbage, {cg, ng});
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
