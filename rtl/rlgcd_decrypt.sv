// rlgcd_decrypt: decryption block of the reversible-logic image cipher.
//
// Undoes rlgcd_encrypt. The key is removed first, then the gates are visited
// in reverse order; each gate is its own inverse, so the same gate modules
// with the same pin order are used:
//
//   c[7:4] = e[7:4] ^ key,  c[3:0] = e[3:0] ^ key
//   c[7:5] -> Fredkin -> Toffoli -> upper SCL A,B,C
//   Feynman(A = c4, B = c3): P -> upper SCL D, Q -> lower SCL A
//   c[2:0] -> Fredkin -> Toffoli -> lower SCL B,C,D
//   d[7:4] = upper SCL outputs, d[3:0] = lower SCL outputs
//
// The stage order is the document's; the pin order follows the reading
// used in rlgcd_encrypt.
//
// Interface and timing: this block holds its own LFSR with the same taps
// and seed as the encryption block. It advances once per accepted pixel, so
// the n-th pixel it receives is opened with the n-th key, the same key that
// closed it, whatever the distance between the two blocks. The decrypted
// pixel appears on de one clock after in_valid, with out_valid. rst_n is
// synchronous and active low and must reset both blocks together.
module rlgcd_decrypt
  import rlgcd_pkg::*;
#(
  parameter key_t LFSR_TAPS = 4'b1010,
  parameter key_t LFSR_SEED = 4'b0000
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  pixel_t en,
  output logic   out_valid,
  output pixel_t de
);
  key_t   key;
  pixel_t c;       // cipher pixel with the key removed
  pixel_t plain;

  assign c = en ^ {key, key};

  // Fredkin stage.
  logic hf_p, hf_q, hf_r, lf_p, lf_q, lf_r;
  fredkin_gate u_fred_hi (.a(c[7]), .b(c[6]), .c(c[5]), .p(hf_p), .q(hf_q), .r(hf_r));
  fredkin_gate u_fred_lo (.a(c[2]), .b(c[1]), .c(c[0]), .p(lf_p), .q(lf_q), .r(lf_r));

  // Toffoli stage.
  logic ht_p, ht_q, ht_r, lt_p, lt_q, lt_r;
  toffoli_gate u_tof_hi (.a(hf_p), .b(hf_q), .c(hf_r), .p(ht_p), .q(ht_q), .r(ht_r));
  toffoli_gate u_tof_lo (.a(lf_p), .b(lf_q), .c(lf_r), .p(lt_p), .q(lt_q), .r(lt_r));

  // Feynman gate separates the two halves again.
  logic fy_p, fy_q;
  feynman_gate u_feyn (.a(c[4]), .b(c[3]), .p(fy_p), .q(fy_q));

  // SCL stage restores the plain pixel.
  scl_gate u_scl_hi (.a(ht_p), .b(ht_q), .c(ht_r), .d(fy_p),
                     .p(plain[7]), .q(plain[6]), .r(plain[5]), .s(plain[4]));
  scl_gate u_scl_lo (.a(fy_q), .b(lt_p), .c(lt_q), .d(lt_r),
                     .p(plain[3]), .q(plain[2]), .r(plain[1]), .s(plain[0]));

  lfsr_key #(.WIDTH(KEY_W), .TAPS(LFSR_TAPS), .SEED(LFSR_SEED)) u_lfsr (
    .clk  (clk),
    .rst_n(rst_n),
    .step (in_valid),
    .key  (key)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      de        <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) de <= plain;
    end
  end
endmodule
