// fb_pkg: types and constants shared by the SRAM framebuffer and video blocks.
//
// The framebuffer stores an 800x600 frame of 16-bit RGB565 pixels in a
// 256K x 32-bit ZBT SRAM, two horizontally adjacent pixels (an even/odd pair)
// per word, in raster order. Pixel (Y,X) has sequential index 800*Y+X; its
// word ("pair address") is that index divided by two. The even pixel of a pair
// sits in bits [15:0] of the word and the odd pixel in bits [31:16] (a choice of
// this design). Writers address pixels by coordinate {Y[9:0], X[9:0]}.
package fb_pkg;

  // Display geometry (SVGA 800x600).
  localparam int unsigned H_ACTIVE = 800;
  localparam int unsigned V_ACTIVE = 600;

  // SRAM geometry: 256K words of 32 data bits (parity bits unused).
  localparam int unsigned SRAM_AW = 18;
  localparam int unsigned SRAM_DW = 32;

  typedef logic [15:0]        pixel_t;     // RGB565 color
  typedef logic [SRAM_AW-1:0] pair_addr_t; // SRAM word address
  typedef logic [SRAM_DW-1:0] word_t;      // two pixels

  // Pixel coordinate as written by the CPU and the Line Engine.
  typedef struct packed {
    logic [9:0] y;
    logic [9:0] x;
  } coord_t;

  // One queued framebuffer write (what a WriteFIFOs entry holds).
  typedef struct packed {
    coord_t coord;
    pixel_t color;
  } pix_write_t;

  // Request from the arbiter to the SRAM controller.
  typedef struct packed {
    logic       write;   // 1 = write, 0 = read
    pair_addr_t addr;
    word_t      wdata;
    logic [3:0] bmask;   // byte enables for writes, active high, bit i = byte i
  } sram_req_t;

endpackage
