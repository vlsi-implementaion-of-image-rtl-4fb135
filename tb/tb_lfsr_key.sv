// tb_lfsr_key: checks the key LFSR.
// The default register (taps Bit 2 and Bit 4, seed 0) must follow the
// sequence worked out by hand from the shift-and-XNOR rule:
// 0, 1, 3, 6, C, 8, 0, ... (key[0] = Bit 1). It must hold its value while
// step is low and return to the seed on reset. A second instance with taps
// Bit 3 and Bit 4 must visit 15 distinct states and come back after 15.
module tb_lfsr_key;
  logic clk = 1'b0, rst_n = 1'b0, step = 1'b0;
  logic [3:0] key, key_max;
  int checks = 0, failures = 0;
  logic [3:0] exp_seq [6] = '{4'h0, 4'h1, 4'h3, 4'h6, 4'hC, 4'h8};

  lfsr_key dut (.clk(clk), .rst_n(rst_n), .step(step), .key(key));
  lfsr_key #(.TAPS(4'b1100)) dut_max (.clk(clk), .rst_n(rst_n), .step(step), .key(key_max));

  always #5 clk = ~clk;

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_key(input logic [3:0] exp, input string what);
    checks++;
    if (key !== exp) begin
      failures++;
      $display("FAIL %s: key=%h exp=%h", what, key, exp);
    end
  endtask

  initial begin
    logic [15:0] seen;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk); #1;
    expect_key(4'h0, "seed");
    // two sequence periods
    step <= 1'b1;
    for (int n = 1; n <= 12; n++) begin
      @(posedge clk); #1;
      expect_key(exp_seq[n % 6], $sformatf("step %0d", n));
    end
    // advance to state 3, then hold
    repeat (2) @(posedge clk);
    step <= 1'b0;
    #1;
    expect_key(4'h3, "before hold");
    repeat (5) @(posedge clk);
    #1;
    expect_key(4'h3, "hold");
    // reset returns to the seed
    rst_n <= 1'b0;
    @(posedge clk); #1;
    expect_key(4'h0, "reset");
    rst_n <= 1'b1;
    // maximal-length taps
    seen = '0;
    step <= 1'b1;
    for (int n = 0; n < 15; n++) begin
      @(posedge clk); #1;
      checks++;
      if (seen[key_max] || key_max == 4'hF) begin
        failures++;
        $display("FAIL max-length LFSR repeated or locked at %h", key_max);
      end
      seen[key_max] = 1'b1;
    end
    checks++;
    if (key_max !== 4'h0) begin
      failures++;
      $display("FAIL max-length LFSR period is not 15 (at %h)", key_max);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
