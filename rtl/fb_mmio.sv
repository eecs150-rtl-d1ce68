// fb_mmio: the framebuffer's place in the CPU memory map.
//
// A CPU store to an address of the form {8'h80, 2'b00, Y[9:0], X[9:0], 2'b00}
// (0x8000_0000 to 0x803F_FFFC) is a write of the 16-bit color in the low half
// of the store data to pixel (Y,X). This block decodes that region and turns
// such a store into CPUCoordIn / CPUDataIn / CPUWriteEnable for the CPU write
// queue. When the queue is not ready, cpu_stall is raised so that the CPU holds
// all its stage registers (and with them the store) until the queue has room;
// the store is enqueued in the cycle where ready is seen high.
//
// Combinational. The address map follows the framebuffer specification; taking
// the color from data bits [15:0] is this design's choice. Address bits 1:0
// (the byte offset) and store data bits 31:16 are ignored, so lint reports
// them as unused.
module fb_mmio
  import fb_pkg::*;
(
  input  logic [31:0] cpu_addr,
  input  logic [31:0] cpu_wdata,
  input  logic        cpu_mem_write,
  output coord_t      CPUCoordIn,
  output pixel_t      CPUDataIn,
  output logic        CPUWriteEnable,
  input  logic        CPUWriteReady,
  output logic        cpu_stall
);

  localparam logic [9:0] FB_REGION = {8'h80, 2'b00};

  logic hit;

  always_comb begin
    hit            = cpu_mem_write && (cpu_addr[31:22] == FB_REGION);
    CPUCoordIn     = '{y: cpu_addr[21:12], x: cpu_addr[11:2]};
    CPUDataIn      = cpu_wdata[15:0];
    CPUWriteEnable = hit;
    cpu_stall      = hit && !CPUWriteReady;
  end

endmodule
