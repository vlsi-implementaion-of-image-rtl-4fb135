// wm_ref_pkg: reference model of the LSB watermark layout, for testbenches.
//
// The watermark is laid out as one bit string: the 16-bit character count,
// then each character, all most significant bit first. Carrier k (pixel
// index 5k) holds string bits 2k (in pixel bit 2) and 2k+1 (in pixel bit 3).
// The message is kept in a fixed array of 817 characters.
package wm_ref_pkg;

  typedef logic [7:0] msg_t [817];

  // String bit number j of the watermark for a message of len characters.
  function automatic logic wm_bit(input msg_t msg, input int len, input int j);
    if (j < 16) return 1'(len >> (15 - j));
    return msg[(j - 16) / 8][7 - ((j - 16) % 8)];
  endfunction

  // Pixel as it should look after embedding.
  function automatic logic [7:0] ref_embed(input msg_t msg, input int len,
                                           input int idx, input logic [7:0] pix);
    int k = idx / 5;
    logic [7:0] out = pix;
    if (idx % 5 == 0 && len <= 817 && 2 * k + 1 < 16 + 8 * len) begin
      out[2] = wm_bit(msg, len, 2 * k);
      out[3] = wm_bit(msg, len, 2 * k + 1);
    end
    return out;
  endfunction

  // Deterministic pseudo-random cover image.
  function automatic logic [7:0] cover_pix(input int idx, input int seed);
    return 8'((idx * 73 + seed * 29 + 5) ^ (idx >> 7) ^ (idx >> 3));
  endfunction

endpackage
