// wm_embed: LSB watermark embedding on the image load path.
//
// The watermark is a string of 8-bit characters. Every GAP-th pixel
// (indices 0, 5, 10, ...) is a carrier and takes two watermark bits, the
// earlier one in pixel bit 2 (third LSB) and the next one in bit 3 (fourth
// LSB); the other pixel bits are untouched. The first LEN_PIXELS carriers
// hold the 16-bit character count, most significant bit first; the
// following carriers hold the characters, most significant bit first, four
// carriers per character. A 128 x 128 image has 3,276 carriers, room for
// (3276 - 8) * 2 / 8 = 817 characters. The carrier layout, bit positions,
// length field and 817-character limit follow the document, which performs
// this step in software; the bit order inside a field and the hardware form
// are this design's choices.
//
// Interface and timing: the message is written one character per clock
// (msg_we, msg_addr, msg_char); msg_len is the character count. The pixel
// path is combinational: pix_out is pix_in with the watermark bits that
// belong at linear index pix_index. If msg_len exceeds MAX_CHARS, len_error
// is high and pixels pass unchanged (the message must be rewritten).
module wm_embed
  import rlgcd_pkg::*;
#(
  parameter int unsigned MAX_CHARS  = WM_MAX_CHARS,
  parameter int unsigned GAP        = WM_GAP,
  parameter int unsigned LEN_PIXELS = WM_LEN_PIXELS,
  parameter int unsigned AW         = ADDR_W,
  parameter int unsigned MW         = $clog2(MAX_CHARS)
) (
  input  logic                  clk,
  input  logic                  msg_we,
  input  logic [MW-1:0]         msg_addr,
  input  logic [WM_CHAR_W-1:0]  msg_char,
  input  logic [2*LEN_PIXELS-1:0] msg_len,
  input  logic [AW-1:0]         pix_index,
  input  pixel_t                pix_in,
  output pixel_t                pix_out,
  output logic                  len_error
);
  localparam int unsigned LW = 2 * LEN_PIXELS;

  logic [WM_CHAR_W-1:0] msg [MAX_CHARS];

  always_ff @(posedge clk) begin
    if (msg_we && 32'(msg_addr) < MAX_CHARS) msg[msg_addr] <= msg_char;
  end

  assign len_error = (32'(msg_len) > MAX_CHARS);

  logic [AW-1:0] carrier;     // carrier number k = index / GAP
  logic          is_carrier;  // index is a multiple of GAP
  logic [AW-1:0] data_k;      // carrier number within the character area
  logic [AW-1:0] char_idx;
  logic [1:0]    pair;        // which bit pair of the character
  logic [1:0]    wm_bits;     // {bit for pixel bit 2, bit for pixel bit 3}
  logic          use_bits;
  logic [WM_CHAR_W-1:0] ch;

  assign carrier    = pix_index / AW'(GAP);
  assign is_carrier = (pix_index % AW'(GAP)) == '0;
  assign data_k     = carrier - AW'(LEN_PIXELS);
  assign char_idx   = data_k / AW'(WM_PIX_PER_CHAR);
  assign pair       = data_k[1:0];

  always_comb begin
    wm_bits  = 2'b00;
    use_bits = 1'b0;
    ch       = '0;
    if (is_carrier && !len_error) begin
      if (carrier < AW'(LEN_PIXELS)) begin
        use_bits = 1'b1;
        wm_bits  = msg_len[LW - 1 - 2*carrier[$clog2(LEN_PIXELS)-1:0] -: 2];
      end else if (32'(char_idx) < 32'(msg_len)) begin
        use_bits = 1'b1;
        ch       = msg[char_idx[MW-1:0]];
        wm_bits  = ch[WM_CHAR_W - 1 - 2*pair -: 2];
      end
    end
  end

  always_comb begin
    pix_out = pix_in;
    if (use_bits) begin
      pix_out[2] = wm_bits[1];
      pix_out[3] = wm_bits[0];
    end
  end
endmodule
