// rlgcd_top: reversible-logic gate cryptography design (RLGCD) for images.
//
// Data flow, one 8-bit pixel per clock:
//
//   load port -> wm_embed -> image_rom -> rlgcd_encrypt -> rlgcd_decrypt -> wm_extract
//                                  inn           en, x1            de        characters
//
// The host writes the raw image through the load port; each pixel passes
// the watermark embedder on its way into the image store, so the store holds
// the watermarked image. A start pulse streams the store through the
// encryption block (reversible gates plus an LFSR key) and straight on into
// the decryption block (the same gates in reverse, its own LFSR in step with
// the first). The decrypted stream, which equals the watermarked image,
// feeds the watermark extractor. The store -> encryption -> decryption chain
// is the document's; putting the watermark embedding and extraction in logic
// on either side of it is this design's choice (the document does both in
// software).
//
// Timing: the clock edge that samples start sets busy; the next edge reads
// address 0 and raises inn_valid; en_valid follows one clock after
// inn_valid and de_valid one clock after en_valid. Pixels then flow one per
// clock with no gaps, so the last decrypted pixel of a 16,384-pixel image is
// registered DEPTH + 2 clocks after the start edge. Hold rst_n (synchronous,
// active low) for one clock before the first start so the two LFSRs begin
// from the same seed, and load the watermark message before the image.
module rlgcd_top
  import rlgcd_pkg::*;
#(
  parameter int unsigned DEPTH     = IMG_DEPTH,
  parameter key_t        LFSR_TAPS = 4'b1010,
  parameter key_t        LFSR_SEED = 4'b0000,
  parameter int unsigned AW        = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  parameter int unsigned MW        = WM_ADDR_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // watermark message
  input  logic                 msg_we,
  input  logic [MW-1:0]        msg_addr,
  input  logic [WM_CHAR_W-1:0] msg_char,
  input  logic [WM_LEN_W-1:0]  msg_len,
  output logic                 len_error,   // msg_len above the capacity
  // image load port (raw pixels; stored watermarked)
  input  logic                 wr_en,
  input  logic [AW-1:0]        wr_addr,
  input  pixel_t               wr_data,
  // run
  input  logic                 start,
  output logic                 busy,
  // watermarked plain pixel stream
  output logic                 inn_valid,
  output pixel_t               inn,
  // encrypted stream and its key
  output logic                 en_valid,
  output pixel_t               en,
  output key_t                 x1,
  // decrypted stream
  output logic                 de_valid,
  output logic [AW-1:0]        de_index,
  output pixel_t               de,
  // recovered watermark
  output logic                 wm_char_valid,
  output logic [WM_CHAR_W-1:0] wm_char,
  output logic [WM_LEN_W-1:0]  wm_len,
  output logic                 wm_len_valid
);
  // Watermark capacity of a DEPTH-pixel image: 817 characters at 16,384.
  localparam int unsigned WM_CHARS =
      ((DEPTH / WM_GAP) - WM_LEN_PIXELS) * 2 / WM_CHAR_W;

  pixel_t        marked;
  logic [AW-1:0] inn_index, en_index;

  wm_embed #(.MAX_CHARS(WM_CHARS), .AW(AW), .MW(MW)) u_embed (
    .clk      (clk),
    .msg_we   (msg_we),
    .msg_addr (msg_addr),
    .msg_char (msg_char),
    .msg_len  (msg_len),
    .pix_index(wr_addr),
    .pix_in   (wr_data),
    .pix_out  (marked),
    .len_error(len_error)
  );

  image_rom #(.DEPTH(DEPTH), .AW(AW)) u_rom (
    .clk      (clk),
    .rst_n    (rst_n),
    .wr_en    (wr_en),
    .wr_addr  (wr_addr),
    .wr_data  (marked),
    .start    (start),
    .busy     (busy),
    .pix_valid(inn_valid),
    .pix_index(inn_index),
    .inn      (inn)
  );

  rlgcd_encrypt #(.LFSR_TAPS(LFSR_TAPS), .LFSR_SEED(LFSR_SEED)) u_enc (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (inn_valid),
    .inn      (inn),
    .out_valid(en_valid),
    .en       (en),
    .x1       (x1)
  );

  rlgcd_decrypt #(.LFSR_TAPS(LFSR_TAPS), .LFSR_SEED(LFSR_SEED)) u_dec (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (en_valid),
    .en       (en),
    .out_valid(de_valid),
    .de       (de)
  );

  // Pixel index travels alongside the two cipher stages.
  always_ff @(posedge clk) begin
    if (inn_valid) en_index <= inn_index;
    if (en_valid)  de_index <= en_index;
  end

  wm_extract #(.AW(AW)) u_extract (
    .clk       (clk),
    .rst_n     (rst_n),
    .pix_valid (de_valid),
    .pix_index (de_index),
    .pix       (de),
    .char_valid(wm_char_valid),
    .char_out  (wm_char),
    .wm_len    (wm_len),
    .len_valid (wm_len_valid)
  );

  // Each stage accepts every pixel of the stage before, one clock later.
  a_en_follows_inn: assert property (@(posedge clk) disable iff (!rst_n)
    en_valid == $past(inn_valid));
  a_de_follows_en: assert property (@(posedge clk) disable iff (!rst_n)
    de_valid == $past(en_valid));
endmodule
