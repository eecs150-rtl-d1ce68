// async_fifo: dual-clock FIFO with a ready/valid enqueue side and an
// asynchronous-read, synchronous-dequeue output side.
//
// Storage is a 2**ADDR_W entry array written in the write clock domain. Read
// and write pointers are ADDR_W+1 bits wide (the extra bit tells full from
// empty) and cross between domains as Gray code through two-flop
// synchronizers, so only one bit changes per step. The output side shows the
// head entry combinationally on rdata whenever rvalid is high; raising rtake
// at a rising edge of rclk removes it and the next entry appears right after.
// On the write side, wen with wready high stores wdata; wcount is the
// occupancy as seen from the write clock (it can only overestimate, by the
// synchronizer delay, never underestimate).
//
// rst is active high and is sampled synchronously by each domain; hold it for
// a few cycles of the slower clock. wen while wready is low is ignored (the
// writer is expected to hold its data and retry). Asserts check that the
// occupancy never exceeds the depth and that nobody dequeues an empty FIFO.
module async_fifo #(
  parameter int unsigned WIDTH  = 36,
  parameter int unsigned ADDR_W = 4
) (
  input  logic              rst,
  // write side
  input  logic              wclk,
  input  logic              wen,
  input  logic [WIDTH-1:0]  wdata,
  output logic              wready,
  output logic [ADDR_W:0]   wcount,
  // read side
  input  logic              rclk,
  input  logic              rtake,
  output logic [WIDTH-1:0]  rdata,
  output logic              rvalid
);

  localparam int unsigned DEPTH = 1 << ADDR_W;

  logic [WIDTH-1:0] mem [DEPTH];

  logic [ADDR_W:0] wbin, wgray, rbin, rgray;
  logic [ADDR_W:0] rgray_w1, rgray_w2;   // read pointer in the write domain
  logic [ADDR_W:0] wgray_r1, wgray_r2;   // write pointer in the read domain
  logic [ADDR_W:0] rbin_w;

  function automatic logic [ADDR_W:0] bin2gray(input logic [ADDR_W:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [ADDR_W:0] gray2bin(input logic [ADDR_W:0] g);
    logic [ADDR_W:0] b;
    b[ADDR_W] = g[ADDR_W];
    for (int i = int'(ADDR_W) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---------------- write domain ----------------
  logic do_write;
  assign do_write = wen && wready;
  assign rbin_w   = gray2bin(rgray_w2);
  assign wcount   = wbin - rbin_w;
  assign wready   = wcount != (ADDR_W+1)'(DEPTH);

  always_ff @(posedge wclk) begin
    if (do_write) mem[wbin[ADDR_W-1:0]] <= wdata;
  end

  always_ff @(posedge wclk) begin
    if (rst) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (do_write) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end

  // ---------------- read domain ----------------
  assign rvalid = rgray != wgray_r2;
  assign rdata  = mem[rbin[ADDR_W-1:0]];

  always_ff @(posedge rclk) begin
    if (rst) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (rtake && rvalid) begin
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
    end
  end

  a_count_bound : assert property (@(posedge wclk) disable iff (rst) wcount <= (ADDR_W+1)'(DEPTH))
    else $error("async_fifo: occupancy above depth");
  a_no_underflow : assert property (@(posedge rclk) disable iff (rst) !(rtake && !rvalid))
    else $error("async_fifo: take while empty");

endmodule
