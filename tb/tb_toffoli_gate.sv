// tb_toffoli_gate: exhaustive test of the Toffoli gate.
// All 8 patterns: outputs against a table written from the definition
// (C inverted only when A and B are both 1) and gate-twice reversibility.
module tb_toffoli_gate;
  logic a, b, c, p, q, r, p2, q2, r2;
  int checks = 0, failures = 0;
  // expected {P,Q,R} for input {A,B,C} = 0..7
  logic [2:0] exp_tab [8] = '{3'b000, 3'b001, 3'b010, 3'b011,
                              3'b100, 3'b101, 3'b111, 3'b110};

  toffoli_gate dut  (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));
  toffoli_gate dut2 (.a(p), .b(q), .c(r), .p(p2), .q(q2), .r(r2));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if ({p, q, r} !== exp_tab[v]) begin
        failures++;
        $display("FAIL in=%b out=%b exp=%b", 3'(v), {p, q, r}, exp_tab[v]);
      end
      checks++;
      if ({p2, q2, r2} !== 3'(v)) begin
        failures++;
        $display("FAIL not reversible in=%b", 3'(v));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
