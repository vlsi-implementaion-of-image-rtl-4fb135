// tb_rlgcd_top_maxlen: end-to-end test of the top level with non-default
// parameters: a 2,048-pixel image, maximal-length LFSR taps (Bit 3 and
// Bit 4) and seed 5. Such an image has 409 carrier pixels, room for
// (409 - 8) * 2 / 8 = 100 characters. A 100-character watermark is
// embedded, the image is encrypted and decrypted, and every pixel and
// character is checked; the key sequence is produced here by a separate
// model of the shift-and-XNOR rule and must visit 15 distinct keys. A
// length of 101 must be refused.
module tb_rlgcd_top_maxlen;
  import rlgcd_pkg::*;
  import rlgcd_ref_pkg::*;
  import wm_ref_pkg::*;

  localparam int   DEPTH = 2048;
  localparam int   CHARS = 100;
  localparam key_t TAPS  = 4'b1100;
  localparam key_t SEED  = 4'b0101;

  logic clk = 1'b0, rst_n = 1'b0;
  logic msg_we = 1'b0, wr_en = 1'b0, start = 1'b0;
  logic [9:0]  msg_addr = '0;
  logic [7:0]  msg_char = '0, wr_data = '0;
  logic [15:0] msg_len = '0;
  logic [10:0] wr_addr = '0;
  logic len_error, busy, inn_valid, en_valid, de_valid, wm_char_valid, wm_len_valid;
  pixel_t inn, en, de;
  key_t   x1;
  logic [10:0] de_index;
  logic [7:0]  wm_char;
  logic [15:0] wm_len;

  int checks = 0, failures = 0;
  msg_t msg;
  key_t model_key;
  int   n_inn, n_en, n_de, n_chars;
  logic [15:0] keys_seen;
  logic [7:0]  inn_hist [DEPTH];

  rlgcd_top #(.DEPTH(DEPTH), .LFSR_TAPS(TAPS), .LFSR_SEED(SEED)) dut (
    .clk(clk), .rst_n(rst_n),
    .msg_we(msg_we), .msg_addr(msg_addr), .msg_char(msg_char), .msg_len(msg_len),
    .len_error(len_error),
    .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_data),
    .start(start), .busy(busy),
    .inn_valid(inn_valid), .inn(inn),
    .en_valid(en_valid), .en(en), .x1(x1),
    .de_valid(de_valid), .de_index(de_index), .de(de),
    .wm_char_valid(wm_char_valid), .wm_char(wm_char),
    .wm_len(wm_len), .wm_len_valid(wm_len_valid)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string s);
    failures++;
    if (failures < 20) $display("FAIL %s", s);
  endtask

  // Next state of a 4-bit shift register with XNOR of Bit 3 and Bit 4
  // shifted into Bit 1 (key[0] = Bit 1).
  function automatic key_t next_key(input key_t k);
    return {k[2:0], ~(k[2] ^ k[3])};
  endfunction

  always @(posedge clk) begin
    logic [7:0] exp;
    if (rst_n && inn_valid) begin
      exp = ref_embed(msg, CHARS, n_inn, cover_pix(n_inn, 7));
      checks++;
      if (inn !== exp) fail($sformatf("inn[%0d]=%h exp %h", n_inn, inn, exp));
      inn_hist[n_inn] = inn;
      n_inn++;
    end
    if (rst_n && en_valid) begin
      checks++;
      if (x1 !== model_key || en !== ref_encrypt(inn_hist[n_en], model_key))
        fail($sformatf("en[%0d]=%h x1=%h exp key %h", n_en, en, x1, model_key));
      keys_seen[model_key] = 1'b1;
      model_key = next_key(model_key);
      n_en++;
    end
    if (rst_n && de_valid) begin
      checks++;
      if (de !== inn_hist[n_de] || de_index !== 11'(n_de))
        fail($sformatf("de[%0d]=%h exp %h", n_de, de, inn_hist[n_de]));
      n_de++;
    end
    if (rst_n && wm_char_valid) begin
      checks++;
      if (n_chars >= CHARS || wm_char !== msg[n_chars])
        fail($sformatf("watermark char %0d = %h exp %h", n_chars, wm_char, msg[n_chars]));
      n_chars++;
    end
  end

  initial begin
    model_key = SEED;
    keys_seen = '0;
    n_inn = 0; n_en = 0; n_de = 0; n_chars = 0;
    for (int i = 0; i < 817; i++) msg[i] = (i < CHARS) ? 8'($urandom) : 8'h00;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < CHARS; i++) begin
      msg_we <= 1'b1; msg_addr <= 10'(i); msg_char <= msg[i];
      @(posedge clk);
    end
    msg_we  <= 1'b0;
    msg_len <= 16'(CHARS + 1);
    @(posedge clk); #1;
    checks++;
    if (len_error !== 1'b1) fail("101 characters accepted in a 2,048-pixel image");
    msg_len <= 16'(CHARS);
    @(posedge clk); #1;
    checks++;
    if (len_error !== 1'b0) fail("100 characters refused");
    for (int i = 0; i < DEPTH; i++) begin
      wr_en <= 1'b1; wr_addr <= 11'(i); wr_data <= cover_pix(i, 7);
      @(posedge clk);
    end
    wr_en <= 1'b0;
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    wait (n_de == DEPTH);
    repeat (3) @(posedge clk);
    checks++;
    if (n_inn != DEPTH || n_en != DEPTH || !wm_len_valid || wm_len !== 16'(CHARS)
        || n_chars != CHARS)
      fail($sformatf("counts inn=%0d en=%0d chars=%0d len=%0d", n_inn, n_en, n_chars, wm_len));
    checks++;
    if (keys_seen !== 16'h7FFF) fail($sformatf("keys used: %b (exp all but 1111)", keys_seen));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
