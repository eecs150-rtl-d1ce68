// fb_system: the SRAM framebuffer and video subsystem.
//
// A whole 800x600 frame of 16-bit pixels lives in an external 256K x 32 ZBT
// SRAM, two pixels per word. Three users share that single-ported memory:
//   * the CPU, writing single pixels through its memory map (fb_mmio), queued
//     in the CPU half of write_fifos; the CPU is stalled when its queue is full;
//   * the Line Engine, whose write port (coordinate, color, enable, ready) is
//     brought out here and queued in the other half of write_fifos;
//   * the video interface (video), reading pixel pairs in raster order at the
//     display rate and sending them to the DVI transmitter.
// fb_arbiter gives video reads priority over CPU writes and CPU writes over
// Line Engine writes, translates write coordinates to SRAM word address and
// byte mask, and hands one request per cycle to sram_ctrl. All read responses
// belong to the video interface, so the controller's resp_valid is its
// PixelsValid.
//
// Clocks: fb_clk runs the arbiter, SRAM controller and SRAM (100 MHz on the
// board); cpu_clk and le_clk are the writers' clocks; pix_clk is the video
// pixel clock (about 49.5 MHz). rst is active high and must be held for a few
// cycles of the slowest clock. The SRAM data bus is split into sram_dq_o,
// sram_dq_oe and sram_dq_i for a tri-state I/O buffer; the SRAM clock output,
// ADV/LD#, CKE# and MODE pins are board wiring outside this module. rgb, hsync,
// vsync and de go to the DVI transmitter's interface logic; the low 3/2/3 bits
// of each color byte in rgb are always zero (16-bit pixels padded to 24).
// wr_dropped pulses (fb_clk) when a queued write lay outside the frame and was
// discarded.
module fb_system
  import fb_pkg::*;
(
  input  logic        fb_clk,
  input  logic        cpu_clk,
  input  logic        le_clk,
  input  logic        pix_clk,
  input  logic        rst,
  // CPU memory-map port (cpu_clk)
  input  logic [31:0] cpu_addr,
  input  logic [31:0] cpu_wdata,
  input  logic        cpu_mem_write,
  output logic        cpu_stall,
  // Line Engine write port (le_clk)
  input  coord_t      le_coord,
  input  pixel_t      le_color,
  input  logic        le_write,
  output logic        le_ready,
  // SRAM pins (fb_clk)
  output pair_addr_t  sram_addr,
  output logic        sram_ce_n,
  output logic        sram_we_n,
  output logic [3:0]  sram_bw_n,
  output logic        sram_oe_n,
  output word_t       sram_dq_o,
  output logic        sram_dq_oe,
  input  word_t       sram_dq_i,
  // video out (pix_clk)
  output logic [23:0] rgb,
  output logic        hsync,
  output logic        vsync,
  output logic        de,
  output logic        video_underflow,
  // status (fb_clk)
  output logic        wr_dropped
);

  // CPU memory map to CPU queue
  coord_t cpu_coord_in;
  pixel_t cpu_data_in;
  logic   cpu_we, cpu_wready;

  fb_mmio u_mmio (
    .cpu_addr      (cpu_addr),
    .cpu_wdata     (cpu_wdata),
    .cpu_mem_write (cpu_mem_write),
    .CPUCoordIn    (cpu_coord_in),
    .CPUDataIn     (cpu_data_in),
    .CPUWriteEnable(cpu_we),
    .CPUWriteReady (cpu_wready),
    .cpu_stall     (cpu_stall)
  );

  // write queues
  pixel_t cpu_head_color, le_head_color;
  coord_t cpu_head_coord, le_head_coord;
  logic   cpu_head_valid, le_head_valid, cpu_take, le_take;
  pix_write_t cpu_head, le_head;

  assign cpu_head = '{coord: cpu_head_coord, color: cpu_head_color};
  assign le_head  = '{coord: le_head_coord, color: le_head_color};

  write_fifos u_wfifos (
    .rst            (rst),
    .fb_clk         (fb_clk),
    .cpu_clk        (cpu_clk),
    .CPUCoordIn     (cpu_coord_in),
    .CPUDataIn      (cpu_data_in),
    .CPUWriteEnable (cpu_we),
    .CPUWriteReady  (cpu_wready),
    .CPUDataOut     (cpu_head_color),
    .CPUCoordOut    (cpu_head_coord),
    .CPUValidRequest(cpu_head_valid),
    .CPUTake        (cpu_take),
    .le_clk         (le_clk),
    .LECoordIn      (le_coord),
    .LEDataIn       (le_color),
    .LEWriteEnable  (le_write),
    .LEWriteReady   (le_ready),
    .LEDataOut      (le_head_color),
    .LECoordOut     (le_head_coord),
    .LEValidRequest (le_head_valid),
    .LETake         (le_take)
  );

  // video read port
  pair_addr_t vid_addr;
  logic       vid_addr_valid;
  word_t      vid_pixels;
  logic       vid_pixels_valid;

  // arbiter
  logic      req_valid;
  sram_req_t req;

  fb_arbiter u_arb (
    .vid_addr_valid(vid_addr_valid),
    .vid_addr      (vid_addr),
    .cpu_valid     (cpu_head_valid),
    .cpu_wr        (cpu_head),
    .cpu_take      (cpu_take),
    .le_valid      (le_head_valid),
    .le_wr         (le_head),
    .le_take       (le_take),
    .req_valid     (req_valid),
    .req           (req),
    .dropped       (wr_dropped)
  );

  sram_ctrl u_sram_ctrl (
    .clk       (fb_clk),
    .rst       (rst),
    .req_valid (req_valid),
    .req       (req),
    .resp_valid(vid_pixels_valid),
    .resp_rdata(vid_pixels),
    .sram_addr (sram_addr),
    .sram_ce_n (sram_ce_n),
    .sram_we_n (sram_we_n),
    .sram_bw_n (sram_bw_n),
    .sram_oe_n (sram_oe_n),
    .sram_dq_o (sram_dq_o),
    .sram_dq_oe(sram_dq_oe),
    .sram_dq_i (sram_dq_i)
  );

  video u_video (
    .rst         (rst),
    .fb_clk      (fb_clk),
    .Address     (vid_addr),
    .AddressValid(vid_addr_valid),
    .Pixels      (vid_pixels),
    .PixelsValid (vid_pixels_valid),
    .pix_clk     (pix_clk),
    .rgb         (rgb),
    .hsync       (hsync),
    .vsync       (vsync),
    .de          (de),
    .underflow   (video_underflow)
  );

endmodule
