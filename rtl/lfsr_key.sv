// lfsr_key: 4-bit Fibonacci LFSR with XNOR feedback that supplies the
// per-pixel cipher key.
//
// Four flip-flops form a shift chain Bit 1 -> Bit 2 -> Bit 3 -> Bit 4. The
// XNOR of the tapped bits is shifted into Bit 1. key[0] is Bit 1 and
// key[WIDTH-1] is the last bit; TAPS has a 1 for every bit that feeds the
// XNOR. The document's figure taps Bit 2 and Bit 4, which is the default
// (TAPS = 4'b1010). Those taps do not give a maximal-length sequence: from
// the zero seed the key repeats every 6 steps. TAPS = 4'b1100 (Bit 3 and
// Bit 4) gives all 15 states other than the all-ones lock-up state.
//
// Interface and timing: rst_n (synchronous, active low) loads SEED. While
// step is high the register shifts once per rising clock edge, so the key
// changes once per processed pixel. key is the register contents; it does
// not depend combinationally on step. The seed value and the per-pixel
// stepping are this design's choices; the document says only that the seed
// is a random starting word.
module lfsr_key #(
  parameter int unsigned           WIDTH = 4,
  parameter logic [WIDTH-1:0]      TAPS  = 4'b1010,
  parameter logic [WIDTH-1:0]      SEED  = '0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             step,
  output logic [WIDTH-1:0] key
);
  logic feedback;

  // XNOR of the tapped bits (for two taps: ~(a ^ b)).
  assign feedback = ~(^(key & TAPS));

  always_ff @(posedge clk) begin
    if (!rst_n)    key <= SEED;
    else if (step) key <= {key[WIDTH-2:0], feedback};
  end

  // All ones is the lock-up state of XNOR feedback: it must never be
  // reached from a legal seed.
  a_no_lockup: assert property (@(posedge clk) disable iff (!rst_n)
    (SEED != '1) |-> key != '1);
endmodule
