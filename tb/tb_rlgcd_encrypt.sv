// tb_rlgcd_encrypt: checks the encryption block against the reference model.
// All 256 pixel values are sent twice (512 pixels), with random idle
// cycles between some of them. Each result must appear exactly one clock
// after its input, with the n-th key of the LFSR sequence on x1 and the
// reference cipher value on en. out_valid must stay low during idle
// cycles. For every key, the 256 ciphertexts must be distinct.
module tb_rlgcd_encrypt;
  import rlgcd_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [7:0] inn = '0, en;
  logic [3:0] x1;
  logic out_valid;
  int checks = 0, failures = 0;

  rlgcd_encrypt dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .inn(inn),
                     .out_valid(out_valid), .en(en), .x1(x1));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned n = 0;
    logic [7:0] sent;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int rep = 0; rep < 2; rep++) begin
      for (int v = 0; v < 256; v++) begin
        if ($urandom_range(3) == 0) begin
          in_valid <= 1'b0;
          @(posedge clk); #1;
          checks++;
          if (out_valid !== 1'b0) begin
            failures++;
            $display("FAIL out_valid high after idle cycle");
          end
        end
        sent = 8'(v ^ (rep * 8'h5A));
        in_valid <= 1'b1;
        inn      <= sent;
        @(posedge clk); #1;
        checks++;
        if (out_valid !== 1'b1 || x1 !== ref_key(n) || en !== ref_encrypt(sent, ref_key(n))) begin
          failures++;
          $display("FAIL pixel %0d in=%h: valid=%b en=%h x1=%h exp en=%h x1=%h",
                   n, sent, out_valid, en, x1, ref_encrypt(sent, ref_key(n)), ref_key(n));
        end
        n++;
      end
    end
    in_valid <= 1'b0;
    // every key gives a one-to-one map (checked on the model the RTL matched)
    for (int k = 0; k < 16; k++) begin
      logic [255:0] seen;
      seen = '0;
      for (int v = 0; v < 256; v++) seen[ref_encrypt(8'(v), 4'(k))] = 1'b1;
      checks++;
      if (seen !== '1) begin
        failures++;
        $display("FAIL key %h is not one-to-one", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
