// video: reads the frame out of the framebuffer and produces SVGA video.
//
// Two clock domains meet here. On the framebuffer clock (fb_clk, 100 MHz on
// the board) an address generator walks the pixel-pair addresses 0 .. PAIRS-1
// in raster order and raises AddressValid for one cycle per read it wants; the
// arbiter always grants it, and the SRAM controller returns the 32-bit word on
// Pixels with PixelsValid some cycles later. Returned words go into a small
// dual-clock FIFO. The generator keeps (FIFO occupancy + reads in flight) at or
// below the FIFO depth, so it issues reads only as fast as the display drains
// them: one per two pixel clocks during active video and none in blanking.
//
// On the pixel clock (pix_clk, about 49.5 MHz for 800x600 at 75 Hz) a timing
// generator counts pixels and lines. In the active area it shows the even
// pixel (bits 15:0) of the FIFO head, then the odd pixel (bits 31:16), and
// dequeues the word. Each 16-bit RGB565 pixel is widened to 24 bits with the
// color bits at the top: {R5,3'b0, G6,2'b0, B5,3'b0}. hsync, vsync, de and rgb
// are registered and change together, one pixel clock after the counters.
// The counters start at the first line after the active area, so the FIFO
// fills during vertical blanking before the first visible pixel. If the FIFO
// is ever empty when a pixel is due, black is shown and the sticky underflow
// flag is set.
//
// Sequential pair addresses, the read handshake, the display rate and the
// color padding follow the framebuffer specification. The blanking intervals are
// the standard VESA 800x600@75Hz ones (16/80/160 pixels, 1/3/21 lines, positive
// sync pulses); the FIFO, the flow control and the start-up order are this
// design's choices. rst is active high and sampled synchronously in each domain.
module video
  import fb_pkg::*;
#(
  parameter int unsigned H_VIS    = 800,
  parameter int unsigned H_FP     = 16,
  parameter int unsigned H_SYNC   = 80,
  parameter int unsigned H_BP     = 160,
  parameter int unsigned V_VIS    = 600,
  parameter int unsigned V_FP     = 1,
  parameter int unsigned V_SYNC   = 3,
  parameter int unsigned V_BP     = 21,
  parameter int unsigned FIFO_AW  = 4
) (
  input  logic        rst,
  // framebuffer side (fb_clk)
  input  logic        fb_clk,
  output pair_addr_t  Address,
  output logic        AddressValid,
  input  word_t       Pixels,
  input  logic        PixelsValid,
  // display side (pix_clk)
  input  logic        pix_clk,
  output logic [23:0] rgb,
  output logic        hsync,
  output logic        vsync,
  output logic        de,
  output logic        underflow
);

  localparam int unsigned PAIRS   = H_VIS * V_VIS / 2;
  localparam int unsigned H_TOTAL = H_VIS + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOTAL = V_VIS + V_FP + V_SYNC + V_BP;
  localparam int unsigned DEPTH   = 1 << FIFO_AW;

  // ---------------- framebuffer side: address generator ----------------
  logic [FIFO_AW:0] fifo_count;
  logic [FIFO_AW:0] in_flight;   // reads issued whose data has not arrived
  logic             fifo_wready;

  assign AddressValid = (32'(fifo_count) + 32'(in_flight)) < DEPTH;

  always_ff @(posedge fb_clk) begin
    if (rst) begin
      Address   <= '0;
      in_flight <= '0;
    end else begin
      if (AddressValid)
        Address <= (32'(Address) == PAIRS - 1) ? '0 : Address + 1'b1;
      in_flight <= in_flight + (FIFO_AW+1)'(AddressValid) - (FIFO_AW+1)'(PixelsValid);
    end
  end

  // ---------------- clock crossing ----------------
  word_t pair;
  logic  pair_valid;
  logic  pair_take;

  async_fifo #(.WIDTH(SRAM_DW), .ADDR_W(FIFO_AW)) u_pix_q (
    .rst   (rst),
    .wclk  (fb_clk),
    .wen   (PixelsValid),
    .wdata (Pixels),
    .wready(fifo_wready),
    .wcount(fifo_count),
    .rclk  (pix_clk),
    .rtake (pair_take),
    .rdata (pair),
    .rvalid(pair_valid)
  );

  // ---------------- display side: timing and pixel output ----------------
  logic [$clog2(H_TOTAL)-1:0] h_cnt;
  logic [$clog2(V_TOTAL)-1:0] v_cnt;
  logic                       active;
  pixel_t                     pix;

  assign active    = (32'(h_cnt) < H_VIS) && (32'(v_cnt) < V_VIS);
  assign pair_take = active && h_cnt[0] && pair_valid;
  assign pix       = h_cnt[0] ? pair[31:16] : pair[15:0];

  always_ff @(posedge pix_clk) begin
    if (rst) begin
      h_cnt     <= '0;
      v_cnt     <= ($clog2(V_TOTAL))'(V_VIS);
      rgb       <= '0;
      hsync     <= 1'b0;
      vsync     <= 1'b0;
      de        <= 1'b0;
      underflow <= 1'b0;
    end else begin
      if (32'(h_cnt) == H_TOTAL - 1) begin
        h_cnt <= '0;
        v_cnt <= (32'(v_cnt) == V_TOTAL - 1) ? '0 : v_cnt + 1'b1;
      end else begin
        h_cnt <= h_cnt + 1'b1;
      end
      de    <= active;
      hsync <= (32'(h_cnt) >= H_VIS + H_FP) && (32'(h_cnt) < H_VIS + H_FP + H_SYNC);
      vsync <= (32'(v_cnt) >= V_VIS + V_FP) && (32'(v_cnt) < V_VIS + V_FP + V_SYNC);
      if (active && pair_valid)
        rgb <= {pix[15:11], 3'b000, pix[10:5], 2'b00, pix[4:0], 3'b000};
      else
        rgb <= '0;
      if (active && !pair_valid)
        underflow <= 1'b1;
    end
  end

  // The flow control never lets the FIFO overflow.
  a_fifo_room : assert property (@(posedge fb_clk) disable iff (rst) !(PixelsValid && !fifo_wready))
    else $error("video: pixel FIFO overflow");

endmodule
