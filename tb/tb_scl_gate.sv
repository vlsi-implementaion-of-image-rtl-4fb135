// tb_scl_gate: exhaustive test of the SCL gate.
// All 16 input patterns are applied; each output is compared with the
// gate equations written out bit by bit, and a second gate fed with the
// first gate's outputs must give the original inputs back (reversibility).
// The outputs over all patterns must also form a permutation of 0..15.
module tb_scl_gate;
  logic a, b, c, d, p, q, r, s, p2, q2, r2, s2;
  int checks = 0, failures = 0;
  logic [15:0] seen;

  scl_gate dut  (.a(a), .b(b), .c(c), .d(d), .p(p), .q(q), .r(r), .s(s));
  scl_gate dut2 (.a(p), .b(q), .c(r), .d(s), .p(p2), .q(q2), .r(r2), .s(s2));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int v = 0; v < 16; v++) begin
      logic exp_s;
      {a, b, c, d} = 4'(v);
      #1;
      // S is 1 when D differs from "A and (B or C)".
      exp_s = (v[3] == 1'b1 && (v[2] == 1'b1 || v[1] == 1'b1)) ? ~v[0] : v[0];
      checks++;
      if ({p, q, r, s} !== {v[3], v[2], v[1], exp_s}) begin
        failures++;
        $display("FAIL in=%b out=%b exp=%b", 4'(v), {p, q, r, s}, {v[3], v[2], v[1], exp_s});
      end
      checks++;
      if ({p2, q2, r2, s2} !== 4'(v)) begin
        failures++;
        $display("FAIL not reversible in=%b back=%b", 4'(v), {p2, q2, r2, s2});
      end
      seen[{p, q, r, s}] = 1'b1;
    end
    checks++;
    if (seen !== 16'hFFFF) begin
      failures++;
      $display("FAIL not a permutation: %b", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
