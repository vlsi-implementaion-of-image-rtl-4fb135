// image_rom: image store that feeds the cipher one pixel per clock.
//
// Holds DEPTH 8-bit pixels (128 x 128 = 16,384 by default, i.e. eight
// 16-kbit block RAMs) in a single-port-write, single-port-read array.
// The document fills this store from a text file; in hardware the image is
// written through the load port (wr_en, wr_addr, wr_data) instead, one
// pixel per clock, which is this design's choice.
//
// Streaming: a one-clock pulse on start (while not busy) resets the internal
// address counter to 0 and raises busy. While busy, one address is read per
// clock. Reads are synchronous: the pixel at address n appears on inn one
// clock after it is addressed, with pix_valid high and pix_index = n. After
// address DEPTH-1 has been read, busy falls; the last pixel leaves one clock
// later. rst_n (synchronous, active low) stops streaming; it does not clear
// the array.
module image_rom
  import rlgcd_pkg::*;
#(
  parameter int unsigned DEPTH = IMG_DEPTH,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // load port
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  pixel_t        wr_data,
  // streaming
  input  logic          start,
  output logic          busy,
  output logic          pix_valid,
  output logic [AW-1:0] pix_index,
  output pixel_t        inn
);
  pixel_t        mem [DEPTH];
  logic [AW-1:0] addr;

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (busy) inn <= mem[addr];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      addr      <= '0;
      pix_valid <= 1'b0;
      pix_index <= '0;
    end else begin
      pix_valid <= busy;
      if (busy) pix_index <= addr;
      if (!busy && start) begin
        busy <= 1'b1;
        addr <= '0;
      end else if (busy) begin
        if (addr == AW'(DEPTH - 1)) busy <= 1'b0;
        else                        addr <= addr + 1'b1;
      end
    end
  end

  // Streaming rules: consecutive pixels carry consecutive indices, and the
  // stream only runs while busy was set on the clock before.
  a_index_steps: assert property (@(posedge clk) disable iff (!rst_n)
    pix_valid && $past(pix_valid) |-> pix_index == $past(pix_index) + 1'b1);
  a_valid_from_busy: assert property (@(posedge clk) disable iff (!rst_n)
    pix_valid |-> $past(busy));
endmodule
