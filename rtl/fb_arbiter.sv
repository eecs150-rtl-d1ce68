// fb_arbiter: chooses one framebuffer user per cycle for the single-ported SRAM.
//
// Three users share the SRAM controller: the video interface reading pixel
// pairs, and the CPU and Line Engine write queues. Priority is fixed: a video
// read (vid_addr_valid) always wins, then a CPU write, then a Line Engine
// write. The video port has no grant signal because it is never refused; a
// write port is granted by raising its take signal, which dequeues the head of
// its queue on the same clock edge the SRAM controller accepts the request.
//
// The chosen write's coordinate goes through a single shared coord_to_addr
// (800*Y+X, then pair address and byte mask), so the translation exists once
// rather than once per writer. A write whose coordinate lies outside the
// 800x600 frame is still taken from its queue but not sent to the SRAM, so that
// it cannot overwrite another pixel.
//
// Purely combinational; the SRAM controller registers the request. The
// priority order follows the framebuffer specification; the shared translation
// and the discarding of out-of-frame writes are this design's choices.
module fb_arbiter
  import fb_pkg::*;
(
  // video interface read requests
  input  logic       vid_addr_valid,
  input  pair_addr_t vid_addr,
  // CPU write queue head
  input  logic       cpu_valid,
  input  pix_write_t cpu_wr,
  output logic       cpu_take,
  // Line Engine write queue head
  input  logic       le_valid,
  input  pix_write_t le_wr,
  output logic       le_take,
  // to the SRAM controller
  output logic       req_valid,
  output sram_req_t  req,
  // the chosen write was outside the frame and was discarded
  output logic       dropped
);

  pix_write_t wr;
  pair_addr_t wr_addr;
  word_t      wr_data;
  logic [3:0] wr_mask;
  logic       wr_in_range;

  assign wr = cpu_valid ? cpu_wr : le_wr;

  coord_to_addr u_xlate (
    .coord    (wr.coord),
    .color    (wr.color),
    .pair_addr(wr_addr),
    .wdata    (wr_data),
    .bmask    (wr_mask),
    .in_range (wr_in_range)
  );

  always_comb begin
    cpu_take  = 1'b0;
    le_take   = 1'b0;
    req_valid = 1'b0;
    dropped   = 1'b0;
    req       = '{write: 1'b0, addr: vid_addr, wdata: wr_data, bmask: 4'h0};
    if (vid_addr_valid) begin
      req_valid = 1'b1;
    end else if (cpu_valid || le_valid) begin
      cpu_take  = cpu_valid;
      le_take   = !cpu_valid;
      req_valid = wr_in_range;
      dropped   = !wr_in_range;
      req       = '{write: 1'b1, addr: wr_addr, wdata: wr_data, bmask: wr_mask};
    end
  end

  // At most one queue is dequeued per cycle, and never while video reads.
  always_comb begin
    a_one_take : assert final (!(cpu_take && le_take))
      else $error("fb_arbiter: both queues taken");
    a_video_first : assert final (!(vid_addr_valid && (cpu_take || le_take)))
      else $error("fb_arbiter: write granted over a video read");
  end

endmodule
