// tb_feynman_gate: exhaustive test of feynman_gate. Every input combination is applied and
// the outputs are compared with a truth table written out below, then the
// mapping is checked to be one-to-one (every output pattern appears once),
// which is what makes the gate reversible.
module tb_feynman_gate;
  int checks = 0, failures = 0;
  logic a, b, p, q;
  // expected {p,q} for inputs {a,b} = 00, 01, 10, 11
  localparam logic [1:0] EXP [4] = '{2'b00, 2'b01, 2'b11, 2'b10};
  bit seen [4] = '{default: 1'b0};
  feynman_gate dut (.a, .b, .p, .q);
  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if ({p, q} !== EXP[v]) begin
        failures++;
        $display("FAIL in=%b out=%b exp=%b", 2'(v), {p, q}, EXP[v]);
      end
      seen[{p, q}] = 1;
    end
    for (int v = 0; v < 4; v++) begin
      checks++;
      if (!seen[v]) begin failures++; $display("FAIL output %b never produced", 2'(v)); end
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
