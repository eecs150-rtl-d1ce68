// write_fifos: the two framebuffer write queues, one for the CPU memory map and
// one for the Line Engine.
//
// Each writer enqueues a pixel write (20-bit {Y,X} coordinate and 16-bit color)
// with <Name>WriteEnable while <Name>WriteReady shows there is room; a writer
// that sees ready low must stall. The framebuffer side sees the head of each
// queue on <Name>CoordOut / <Name>DataOut with <Name>ValidRequest, read
// asynchronously, and dequeues it by raising <Name>Take at a rising edge of
// fb_clk. Each queue is an async_fifo, so each writer may run on its own clock:
// cpu_clk and le_clk for enqueueing, fb_clk for dequeueing. Besides crossing
// clocks, the queue lets the CPU keep running while the SRAM is busy with video
// reads.
//
// The port set and the read/dequeue timing follow the WriteFIFOs interface of
// the framebuffer specification; the depth (2**ADDR_W entries per queue, 16 by
// default) and the shared synchronous reset are this design's choices.
module write_fifos
  import fb_pkg::*;
#(
  parameter int unsigned ADDR_W = 4
) (
  input  logic   rst,
  input  logic   fb_clk,
  // CPU enqueue side (cpu_clk)
  input  logic   cpu_clk,
  input  coord_t CPUCoordIn,
  input  pixel_t CPUDataIn,
  input  logic   CPUWriteEnable,
  output logic   CPUWriteReady,
  // CPU dequeue side (fb_clk)
  output pixel_t CPUDataOut,
  output coord_t CPUCoordOut,
  output logic   CPUValidRequest,
  input  logic   CPUTake,
  // Line Engine enqueue side (le_clk)
  input  logic   le_clk,
  input  coord_t LECoordIn,
  input  pixel_t LEDataIn,
  input  logic   LEWriteEnable,
  output logic   LEWriteReady,
  // Line Engine dequeue side (fb_clk)
  output pixel_t LEDataOut,
  output coord_t LECoordOut,
  output logic   LEValidRequest,
  input  logic   LETake
);

  pix_write_t cpu_head, le_head;
  logic [ADDR_W:0] cpu_count_unused, le_count_unused;

  async_fifo #(.WIDTH($bits(pix_write_t)), .ADDR_W(ADDR_W)) u_cpu_q (
    .rst   (rst),
    .wclk  (cpu_clk),
    .wen   (CPUWriteEnable),
    .wdata ({CPUCoordIn, CPUDataIn}),
    .wready(CPUWriteReady),
    .wcount(cpu_count_unused),
    .rclk  (fb_clk),
    .rtake (CPUTake),
    .rdata (cpu_head),
    .rvalid(CPUValidRequest)
  );

  async_fifo #(.WIDTH($bits(pix_write_t)), .ADDR_W(ADDR_W)) u_le_q (
    .rst   (rst),
    .wclk  (le_clk),
    .wen   (LEWriteEnable),
    .wdata ({LECoordIn, LEDataIn}),
    .wready(LEWriteReady),
    .wcount(le_count_unused),
    .rclk  (fb_clk),
    .rtake (LETake),
    .rdata (le_head),
    .rvalid(LEValidRequest)
  );

  assign CPUCoordOut = cpu_head.coord;
  assign CPUDataOut  = cpu_head.color;
  assign LECoordOut  = le_head.coord;
  assign LEDataOut   = le_head.color;

endmodule
