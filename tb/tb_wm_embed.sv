// tb_wm_embed: checks watermark embedding on every pixel of a 128 x 128
// image for three messages: "OUTPUT" (6 characters), a random message of
// the maximum 817 characters, and an 818-character message, which must be
// refused (len_error) and leave every pixel unchanged. The expected pixels
// come from the bit-string reference model.
module tb_wm_embed;
  import wm_ref_pkg::*;
  logic clk = 1'b0, msg_we = 1'b0, len_error;
  logic [9:0]  msg_addr = '0;
  logic [7:0]  msg_char = '0, pix_in = '0, pix_out;
  logic [15:0] msg_len = '0;
  logic [13:0] pix_index = '0;
  int checks = 0, failures = 0;
  msg_t msg;

  wm_embed dut (.clk(clk), .msg_we(msg_we), .msg_addr(msg_addr), .msg_char(msg_char),
                .msg_len(msg_len), .pix_index(pix_index), .pix_in(pix_in),
                .pix_out(pix_out), .len_error(len_error));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(input int len);
    for (int i = 0; i < 817; i++) begin
      msg_we   <= 1'b1;
      msg_addr <= 10'(i);
      msg_char <= msg[i];
      @(posedge clk);
    end
    msg_we  <= 1'b0;
    msg_len <= 16'(len);
    @(posedge clk);
  endtask

  task automatic sweep(input int len, input int seed);
    int changed = 0;
    checks++;
    if (len_error !== (len > 817)) begin
      failures++;
      $display("FAIL len_error=%b for length %0d", len_error, len);
    end
    for (int idx = 0; idx < 16384; idx++) begin
      pix_index = 14'(idx);
      pix_in    = cover_pix(idx, seed);
      #1;
      checks++;
      if (pix_out !== ref_embed(msg, len, idx, pix_in)) begin
        failures++;
        if (failures < 10)
          $display("FAIL len %0d idx %0d: in=%h out=%h exp=%h", len, idx, pix_in, pix_out,
                   ref_embed(msg, len, idx, pix_in));
      end
      if (pix_out != pix_in) changed++;
    end
    $display("length %0d: %0d pixels changed", len, changed);
  endtask

  initial begin
    string word;
    word = "OUTPUT";
    for (int i = 0; i < 817; i++) msg[i] = 8'($urandom);
    for (int i = 0; i < 6; i++) msg[i] = word[i];
    load(6);
    sweep(6, 1);
    load(817);
    sweep(817, 2);
    load(818);
    sweep(818, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
