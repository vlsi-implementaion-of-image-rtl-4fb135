// rlgcd_ref_pkg: reference model of the pixel cipher, for testbenches.
//
// Written from the gate definitions as plain if/else code, without the RTL
// gate modules: SCL, Toffoli, Fredkin on each half, a Feynman gate between
// the halves, then XOR of each nibble with the 4-bit key. ref_key(n) is the
// n-th key of the default LFSR (taps Bit 2 and Bit 4, seed 0), whose period
// is 6: 0, 1, 3, 6, C, 8.
package rlgcd_ref_pkg;

  function automatic logic [3:0] ref_key(input int unsigned n);
    case (n % 6)
      0: return 4'h0;
      1: return 4'h1;
      2: return 4'h3;
      3: return 4'h6;
      4: return 4'hC;
      default: return 4'h8;
    endcase
  endfunction

  // Fredkin on (a, b, c): swap b and c when a is set.
  function automatic logic [2:0] ref_fredkin(input logic a, b, c);
    if (a) return {a, c, b};
    return {a, b, c};
  endfunction

  function automatic logic [7:0] ref_encrypt(input logic [7:0] i, input logic [3:0] key);
    logic s_hi, s_lo, t_hi, t_lo;
    logic [2:0] f_hi, f_lo;
    logic [7:0] m;
    // SCL: the fourth line flips when A and (B or C)
    s_hi = i[4];
    if (i[7] && (i[6] || i[5])) s_hi = ~s_hi;
    s_lo = i[0];
    if (i[3] && (i[2] || i[1])) s_lo = ~s_lo;
    // Toffoli: the third line flips when both controls are set
    t_hi = i[5];
    if (i[7] && i[6]) t_hi = ~t_hi;
    t_lo = s_lo;
    if (i[2] && i[1]) t_lo = ~t_lo;
    f_hi = ref_fredkin(i[7], i[6], t_hi);
    f_lo = ref_fredkin(i[2], i[1], t_lo);
    // Feynman between the halves
    m = {f_hi, s_hi, s_hi ^ i[3], f_lo};
    return m ^ {key, key};
  endfunction

endpackage
