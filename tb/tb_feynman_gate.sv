// tb_feynman_gate: exhaustive test of the Feynman gate.
// All 4 patterns against the truth table of a controlled-NOT, and
// gate-twice reversibility.
module tb_feynman_gate;
  logic a, b, p, q, p2, q2;
  int checks = 0, failures = 0;
  logic [1:0] exp_tab [4] = '{2'b00, 2'b01, 2'b11, 2'b10};

  feynman_gate dut  (.a(a), .b(b), .p(p), .q(q));
  feynman_gate dut2 (.a(p), .b(q), .p(p2), .q(q2));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if ({p, q} !== exp_tab[v]) begin
        failures++;
        $display("FAIL in=%b out=%b exp=%b", 2'(v), {p, q}, exp_tab[v]);
      end
      checks++;
      if ({p2, q2} !== 2'(v)) begin
        failures++;
        $display("FAIL not reversible in=%b", 2'(v));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
