// tb_rlgcd_top: end-to-end test of the image cipher at full size
// (128 x 128 pixels, all parameters at their defaults).
//
// 1. The watermark "OUTPUT" is loaded and a pseudo-random cover image is
//    written through the load port.
// 2. A start pulse streams the image. Every pixel on inn must equal the
//    reference watermarked pixel; every pixel on en must equal the reference
//    cipher of it under the n-th key, with that key on x1; every pixel on
//    de must equal the pixel on inn. The recovered watermark must read
//    "OUTPUT" with length 6. Timing is checked: the first inn one clock
//    after the edge that samples start, en one clock later, de one more,
//    then one pixel per clock with no gaps.
// 3. Without a reset, a second image carrying an 817-character watermark is
//    loaded and streamed; keys continue where the first run stopped and the
//    decryption must still follow.
// 4. An 818-character length must raise len_error and embed nothing.
// Mechanisms counted: pixels changed by embedding, LFSR sequence wraps,
// pixels encrypted, pixels decrypted, characters extracted, length refusals.
module tb_rlgcd_top;
  import rlgcd_pkg::*;
  import rlgcd_ref_pkg::*;
  import wm_ref_pkg::*;

  localparam int DEPTH = IMG_DEPTH;

  logic clk = 1'b0, rst_n = 1'b0;
  logic msg_we = 1'b0, wr_en = 1'b0, start = 1'b0;
  logic [9:0]  msg_addr = '0;
  logic [7:0]  msg_char = '0, wr_data = '0;
  logic [15:0] msg_len = '0;
  logic [13:0] wr_addr = '0;
  logic len_error, busy, inn_valid, en_valid, de_valid, wm_char_valid, wm_len_valid;
  pixel_t inn, en, de;
  key_t   x1;
  logic [13:0] de_index;
  logic [7:0]  wm_char;
  logic [15:0] wm_len;

  int checks = 0, failures = 0;
  msg_t msg;
  int   cur_len, cur_seed;
  int unsigned key_n;      // keys used so far, across runs
  int   n_inn, n_en, n_de, n_chars;
  int   cyc, first_inn, first_en, first_de, last_de;
  // mechanism counters
  int   m_embedded, m_wraps, m_refused;

  rlgcd_top dut (
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
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string s);
    failures++;
    if (failures < 20) $display("FAIL %s", s);
  endtask

  // Stream monitors.
  logic [7:0] inn_hist [DEPTH];
  int start_cyc;
  always @(posedge clk) begin
    logic [7:0] exp;
    key_t       k;
    cyc++;
    if (rst_n && start && !busy) start_cyc = cyc;
    if (rst_n && inn_valid) begin
      exp = ref_embed(msg, cur_len, n_inn, cover_pix(n_inn, cur_seed));
      checks++;
      if (inn !== exp) fail($sformatf("inn[%0d]=%h exp %h", n_inn, inn, exp));
      if (inn != cover_pix(n_inn, cur_seed)) m_embedded++;
      inn_hist[n_inn] = inn;
      if (first_inn < 0) first_inn = cyc;
      n_inn++;
    end
    if (rst_n && en_valid) begin
      k = ref_key(key_n);
      checks++;
      if (x1 !== k || en !== ref_encrypt(inn_hist[n_en], k))
        fail($sformatf("en[%0d]=%h x1=%h exp %h / %h", n_en, en, x1,
                       ref_encrypt(inn_hist[n_en], k), k));
      if (key_n % 6 == 5) m_wraps++;
      key_n++;
      if (first_en < 0) first_en = cyc;
      n_en++;
    end
    if (rst_n && de_valid) begin
      checks++;
      if (de !== inn_hist[n_de] || de_index !== 14'(n_de))
        fail($sformatf("de[%0d]=%h index %0d exp %h", n_de, de, de_index, inn_hist[n_de]));
      if (first_de < 0) first_de = cyc;
      last_de = cyc;
      n_de++;
    end
    if (rst_n && wm_char_valid) begin
      checks++;
      if (n_chars >= cur_len || wm_char !== msg[n_chars])
        fail($sformatf("watermark char %0d = %h exp %h", n_chars, wm_char, msg[n_chars]));
      n_chars++;
    end
  end

  task automatic load_msg(input int len);
    for (int i = 0; i < 817; i++) begin
      msg_we <= 1'b1; msg_addr <= 10'(i); msg_char <= msg[i];
      @(posedge clk);
    end
    msg_we  <= 1'b0;
    msg_len <= 16'(len);
    @(posedge clk);
  endtask

  task automatic load_image(input int seed);
    for (int i = 0; i < DEPTH; i++) begin
      wr_en <= 1'b1; wr_addr <= 14'(i); wr_data <= cover_pix(i, seed);
      @(posedge clk);
    end
    wr_en <= 1'b0;
    @(posedge clk);
  endtask

  task automatic run(input int len, input int seed);
    cur_len = len; cur_seed = seed;
    n_inn = 0; n_en = 0; n_de = 0; n_chars = 0;
    first_inn = -1; first_en = -1; first_de = -1; last_de = -1;
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    wait (n_de == DEPTH);
    repeat (3) @(posedge clk);
    checks++;
    if (n_inn != DEPTH || n_en != DEPTH || n_de != DEPTH)
      fail($sformatf("counts inn=%0d en=%0d de=%0d", n_inn, n_en, n_de));
    // latency, seen by a monitor that samples at the clock edge: inn is
    // registered on the edge after the one that takes start, so it is seen
    // two edges after start; en one edge later, de one more; one per clock
    checks++;
    if (first_inn - start_cyc != 2 || first_en - first_inn != 1 || first_de - first_en != 1
        || last_de - first_de != DEPTH - 1)
      fail($sformatf("timing: inn +%0d, en +%0d, de +%0d, span %0d",
                     first_inn - start_cyc, first_en - first_inn, first_de - first_en,
                     last_de - first_de));
    checks++;
    if (!wm_len_valid || wm_len !== 16'(len) || n_chars != len)
      fail($sformatf("watermark length %0d, %0d chars, exp %0d", wm_len, n_chars, len));
    $display("run (watermark %0d chars): %0d pixels, %0d cycles from start to last de",
             len, n_de, last_de - start_cyc);
  endtask

  initial begin
    string word;
    word = "OUTPUT";
    cyc = 0; key_n = 0; m_embedded = 0; m_wraps = 0; m_refused = 0;
    n_inn = 0; n_en = 0; n_de = 0; n_chars = 0; cur_len = 0; cur_seed = 0;
    for (int i = 0; i < 817; i++) msg[i] = 8'($urandom);
    for (int i = 0; i < 6; i++) msg[i] = word[i];
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    load_msg(6);
    load_image(1);
    run(6, 1);

    for (int i = 0; i < 817; i++) msg[i] = 8'($urandom);
    load_msg(817);
    checks++;
    if (len_error !== 1'b0) fail("len_error for 817 characters");
    load_image(2);
    run(817, 2);

    // too long: refused, nothing embedded
    msg_len <= 16'd818;
    @(posedge clk); #1;
    checks++;
    if (len_error !== 1'b1) fail("len_error low for 818 characters");
    else m_refused++;

    $display("mechanisms: embedded=%0d key_wraps=%0d encrypted=%0d refused=%0d",
             m_embedded, m_wraps, key_n, m_refused);
    checks++;
    if (m_embedded == 0 || m_wraps == 0 || key_n == 0 || m_refused == 0)
      fail("a mechanism never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
