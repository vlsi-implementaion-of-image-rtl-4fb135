// tb_rlgcd_decrypt: checks the decryption block on its own.
// Cipher pixels are produced by the reference model with the n-th key of
// the LFSR sequence; the block must return the original pixel one clock
// after each input, through random idle cycles. All 256 pixel values are
// covered under every key of the sequence (256 x 6 pixels).
module tb_rlgcd_decrypt;
  import rlgcd_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [7:0] en = '0, de;
  logic out_valid;
  int checks = 0, failures = 0;

  rlgcd_decrypt dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .en(en),
                     .out_valid(out_valid), .de(de));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned n = 0;
    logic [7:0] plain;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // pixel v is sent 6 times in a row, so it meets all 6 keys
    for (int v = 0; v < 256; v++) begin
      for (int k = 0; k < 6; k++) begin
        if ($urandom_range(7) == 0) begin
          in_valid <= 1'b0;
          @(posedge clk); #1;
          checks++;
          if (out_valid !== 1'b0) begin
            failures++;
            $display("FAIL out_valid high after idle cycle");
          end
        end
        plain    = 8'(v);
        in_valid <= 1'b1;
        en       <= ref_encrypt(plain, ref_key(n));
        @(posedge clk); #1;
        checks++;
        if (out_valid !== 1'b1 || de !== plain) begin
          failures++;
          $display("FAIL pixel %0d: valid=%b de=%h exp=%h", n, out_valid, de, plain);
        end
        n++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
