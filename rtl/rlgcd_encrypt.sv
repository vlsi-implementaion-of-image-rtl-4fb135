// rlgcd_encrypt: encryption block of the reversible-logic image cipher.
//
// One 8-bit pixel i[7:0] is enciphered per clock by a network of reversible
// gates followed by an XOR with the LFSR key:
//
//   upper half  i[7:4] -> SCL(A=i7,B=i6,C=i5,D=i4)
//   lower half  i[3:0] -> SCL(A=i3,B=i2,C=i1,D=i0)
//   upper SCL P,Q,R -> Toffoli -> Fredkin -> bits 7,6,5
//   lower SCL Q,R,S -> Toffoli -> Fredkin -> bits 2,1,0
//   Feynman(A = upper SCL S, B = lower SCL P): P -> bit 4, Q -> bit 3
//   e[7:4] = bits[7:4] ^ key,  e[3:0] = bits[3:0] ^ key
//
// Every gate is a bijection, so the whole network is one too and
// rlgcd_decrypt can undo it. The gate inventory and the order of the
// stages are the document's. The pin order of each gate (which wire is A,
// B, C), the Feynman output assignment and applying the 4-bit key to both
// nibbles are this design's reading of the block diagram.
//
// Interface and timing: when in_valid is high, inn is enciphered with the
// current key, the result is registered into en one clock later together
// with out_valid and the key used (x1), and the internal LFSR advances, so
// each pixel gets the next key of the sequence. Throughput is one pixel per
// clock, latency one clock. rst_n is synchronous and active low.
module rlgcd_encrypt
  import rlgcd_pkg::*;
#(
  parameter key_t LFSR_TAPS = 4'b1010,
  parameter key_t LFSR_SEED = 4'b0000
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  pixel_t inn,
  output logic   out_valid,
  output pixel_t en,
  output key_t   x1
);
  key_t   key;
  pixel_t mixed;   // gate network output, before the key

  // Upper and lower SCL gates.
  logic hs_p, hs_q, hs_r, hs_s;
  logic ls_p, ls_q, ls_r, ls_s;
  scl_gate u_scl_hi (.a(inn[7]), .b(inn[6]), .c(inn[5]), .d(inn[4]),
                     .p(hs_p), .q(hs_q), .r(hs_r), .s(hs_s));
  scl_gate u_scl_lo (.a(inn[3]), .b(inn[2]), .c(inn[1]), .d(inn[0]),
                     .p(ls_p), .q(ls_q), .r(ls_r), .s(ls_s));

  // Toffoli stage.
  logic ht_p, ht_q, ht_r, lt_p, lt_q, lt_r;
  toffoli_gate u_tof_hi (.a(hs_p), .b(hs_q), .c(hs_r), .p(ht_p), .q(ht_q), .r(ht_r));
  toffoli_gate u_tof_lo (.a(ls_q), .b(ls_r), .c(ls_s), .p(lt_p), .q(lt_q), .r(lt_r));

  // Fredkin stage.
  fredkin_gate u_fred_hi (.a(ht_p), .b(ht_q), .c(ht_r),
                          .p(mixed[7]), .q(mixed[6]), .r(mixed[5]));
  fredkin_gate u_fred_lo (.a(lt_p), .b(lt_q), .c(lt_r),
                          .p(mixed[2]), .q(mixed[1]), .r(mixed[0]));

  // Feynman gate couples the two halves.
  feynman_gate u_feyn (.a(hs_s), .b(ls_p), .p(mixed[4]), .q(mixed[3]));

  lfsr_key #(.WIDTH(KEY_W), .TAPS(LFSR_TAPS), .SEED(LFSR_SEED)) u_lfsr (
    .clk  (clk),
    .rst_n(rst_n),
    .step (in_valid),
    .key  (key)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      en        <= '0;
      x1        <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        en <= mixed ^ {key, key};
        x1 <= key;
      end
    end
  end
endmodule
