// tb_toffoli_gate: exhaustive test of toffoli_gate. Every input combination is applied and
// the outputs are compared with a truth table written out below, then the
// mapping is checked to be one-to-one (every output pattern appears once),
// which is what makes the gate reversible.
module tb_toffoli_gate;
  int checks = 0, failures = 0;
  logic a, b, c, p, q, r;
  // expected {p,q,r} for inputs {a,b,c} = 000 .. 111
  localparam logic [2:0] EXP [8] = '{3'b000, 3'b001, 3'b010, 3'b011, 3'b100, 3'b101, 3'b111, 3'b110};
  bit seen [8] = '{default: 1'b0};
  toffoli_gate dut (.a, .b, .c, .p, .q, .r);
  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if ({p, q, r} !== EXP[v]) begin
        failures++;
        $display("FAIL in=%b out=%b exp=%b", 3'(v), {p, q, r}, EXP[v]);
      end
      seen[{p, q, r}] = 1;
    end
    for (int v = 0; v < 8; v++) begin
      checks++;
      if (!seen[v]) begin failures++; $display("FAIL output %b never produced", 3'(v)); end
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
