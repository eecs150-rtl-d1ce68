// coord_to_addr: pixel coordinate to SRAM word address and byte mask.
//
// Computes the raster index SeqAddress = 800*Y + X with a multiply-by-constant
// written as shifts and adds (800*Y = 512*Y + 256*Y + 32*Y), so no multiplier
// is needed; other widths fall back to a constant multiply. The SRAM word
// holding the pixel is SeqAddress/2, and bit 0 of SeqAddress selects the even
// pixel (bytes 1:0) or the odd pixel (bytes 3:2) of that word. The color is
// replicated into both halves of the write word so that only the byte mask
// decides which half is written. Coordinates outside 800x600 are flagged with
// in_range = 0 so the caller can discard them.
//
// The formula follows the framebuffer specification; the even-low/odd-high
// packing and the range flag are choices of this design. Purely combinational.
module coord_to_addr
  import fb_pkg::*;
#(
  parameter int unsigned WIDTH  = H_ACTIVE,
  parameter int unsigned HEIGHT = V_ACTIVE
) (
  input  coord_t     coord,
  input  pixel_t     color,
  output pair_addr_t pair_addr,
  output word_t      wdata,
  output logic [3:0] bmask,
  output logic       in_range
);

  logic [19:0] seq_addr;
  logic [19:0] row_base;   // WIDTH * Y
  logic [19:0] y20;

  assign y20 = 20'(coord.y);

  if (WIDTH == 800) begin : g_shift_add
    assign row_base = (y20 << 9) + (y20 << 8) + (y20 << 5);
  end else begin : g_generic
    assign row_base = y20 * 20'(WIDTH);
  end

  always_comb begin
    seq_addr  = row_base + 20'(coord.x);
    pair_addr = seq_addr[SRAM_AW:1];
    bmask     = seq_addr[0] ? 4'b1100 : 4'b0011;
    wdata     = {color, color};
    in_range  = (32'(coord.x) < WIDTH) && (32'(coord.y) < HEIGHT);
  end

endmodule
