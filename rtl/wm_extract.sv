// wm_extract: recovers the LSB watermark from the decrypted pixel stream.
//
// The reverse of wm_embed. Carrier pixels are those whose linear index is a
// multiple of GAP. From each carrier the bits {pixel[2], pixel[3]} are
// shifted in, bit 2 first. The first LEN_PIXELS carriers build the 16-bit
// character count; after them every fourth carrier completes an 8-bit
// character, which is emitted while fewer than wm_len characters have been
// emitted. The layout follows the document, which performs this step in
// software; the streaming hardware form is this design's own.
//
// Interface and timing: pixels arrive with pix_valid and their linear index
// in any rate, in increasing index order. A pixel with index 0 starts a new
// image (clears the length). len_valid rises the clock after the last length
// carrier. char_valid is a one-clock pulse, registered, with char_out, the
// clock after the pixel that completes a character. rst_n is synchronous
// and active low. Only pixel bits 2 and 3 are read; the other six bits of
// pix are unused by design.
module wm_extract
  import rlgcd_pkg::*;
#(
  parameter int unsigned GAP        = WM_GAP,
  parameter int unsigned LEN_PIXELS = WM_LEN_PIXELS,
  parameter int unsigned AW         = ADDR_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    pix_valid,
  input  logic [AW-1:0]           pix_index,
  input  pixel_t                  pix,
  output logic                    char_valid,
  output logic [WM_CHAR_W-1:0]    char_out,
  output logic [2*LEN_PIXELS-1:0] wm_len,
  output logic                    len_valid
);
  logic [AW-1:0]          carrier;
  logic                   is_carrier;
  logic [AW-1:0]          data_k;
  logic [AW-1:0]          char_idx;
  logic [WM_CHAR_W-3:0]   partial;   // first six bits of the current character
  logic [1:0]             bits;

  assign carrier    = pix_index / AW'(GAP);
  assign is_carrier = (pix_index % AW'(GAP)) == '0;
  assign data_k     = carrier - AW'(LEN_PIXELS);
  assign char_idx   = data_k / AW'(WM_PIX_PER_CHAR);
  assign bits       = {pix[2], pix[3]};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wm_len     <= '0;
      len_valid  <= 1'b0;
      partial    <= '0;
      char_valid <= 1'b0;
      char_out   <= '0;
    end else begin
      char_valid <= 1'b0;
      if (pix_valid && is_carrier) begin
        if (carrier < AW'(LEN_PIXELS)) begin
          // A new image starts with carrier 0: the old length is dropped.
          wm_len    <= (carrier == '0) ? {{(2*LEN_PIXELS-2){1'b0}}, bits}
                                       : {wm_len[2*LEN_PIXELS-3:0], bits};
          len_valid <= (carrier == AW'(LEN_PIXELS - 1));
        end else begin
          partial <= {partial[WM_CHAR_W-5:0], bits};
          if (data_k[1:0] == 2'd3 && 32'(char_idx) < 32'(wm_len)) begin
            char_valid <= 1'b1;
            char_out   <= {partial, bits};
          end
        end
      end
    end
  end
endmodule
