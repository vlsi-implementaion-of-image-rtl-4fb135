// tb_wm_extract: checks watermark extraction from a pixel stream.
// Three 128 x 128 images are built with the reference layout and streamed
// in index order with random idle cycles: one holding "OUTPUT", one holding
// 817 random characters, and one holding 40 characters (to check that a
// new image restarts the length). The recovered length and every recovered
// character must match, and no extra characters may appear.
module tb_wm_extract;
  import wm_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, pix_valid = 1'b0;
  logic [13:0] pix_index = '0;
  logic [7:0]  pix = '0, char_out;
  logic        char_valid, len_valid;
  logic [15:0] wm_len;
  int checks = 0, failures = 0;
  msg_t msg;
  int   got;

  wm_extract dut (.clk(clk), .rst_n(rst_n), .pix_valid(pix_valid), .pix_index(pix_index),
                  .pix(pix), .char_valid(char_valid), .char_out(char_out),
                  .wm_len(wm_len), .len_valid(len_valid));

  always #5 clk = ~clk;

  initial begin
    repeat (80000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Collect characters as they come out.
  int cur_len;
  always @(posedge clk) begin
    if (rst_n && char_valid) begin
      checks++;
      if (got >= cur_len || char_out !== msg[got]) begin
        failures++;
        $display("FAIL char %0d: got %h exp %h (length %0d)", got, char_out,
                 (got < 817) ? msg[got] : 8'h00, cur_len);
      end
      got++;
    end
  end

  task automatic stream(input int len, input int seed);
    cur_len = len;
    got = 0;
    for (int idx = 0; idx < 16384; idx++) begin
      if ($urandom_range(9) == 0) begin
        pix_valid <= 1'b0;
        @(posedge clk);
      end
      pix_valid <= 1'b1;
      pix_index <= 14'(idx);
      pix       <= ref_embed(msg, len, idx, cover_pix(idx, seed));
      @(posedge clk);
    end
    pix_valid <= 1'b0;
    repeat (2) @(posedge clk);
    checks++;
    if (!len_valid || wm_len !== 16'(len) || got != len) begin
      failures++;
      $display("FAIL length %0d: len_valid=%b wm_len=%0d, %0d characters recovered",
               len, len_valid, wm_len, got);
    end
  endtask

  initial begin
    string word;
    word = "OUTPUT";
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 817; i++) msg[i] = 8'($urandom);
    for (int i = 0; i < 6; i++) msg[i] = word[i];
    stream(6, 1);
    stream(817, 2);
    stream(40, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
