// sram_ctrl: controller for a pipelined ZBT (zero bus turnaround) SRAM.
//
// The design side is a simple request/response port: when req_valid is high a
// read or a write (with a 4-bit byte mask) is accepted on that clock edge; there
// is no ready, because a ZBT SRAM accepts any mix of reads and writes on every
// cycle. Read data returns on resp_rdata with resp_valid high, in request order.
//
// The SRAM side drives the device's synchronous, active-low controls. All pins
// are registered, so the SRAM samples a command one cycle after the controller
// accepted it (edge k). ZBT devices have a 2-cycle latency for both directions:
// write data must be on the bus at edge k+2, and read data is on the bus at
// edge k+2. The controller therefore carries each request down a short pipeline:
//
//   edge t    : request accepted, address/CE#/WE#/BW# registered onto the pins
//   edge t+1  : SRAM samples the command (k)
//   edge t+2  : write data driven onto the bus (dq_oe), OE# raised meanwhile
//   edge t+3  : SRAM samples write data / controller samples read data;
//               resp_valid is high in the following cycle
//
// so a read's response appears 3 cycles after its request is accepted. Because
// reads and writes both use their data slot exactly two cycles after the
// command, back-to-back mixes never collide on the bus. The bidirectional data
// bus is split into dq_o / dq_oe / dq_i for an I/O buffer outside this module;
// ADV/LD#, CKE# and MODE are static on the board and are not driven here. The
// 4 parity bits are unused. The active-low pins, the one-access-per-cycle rate
// and the 2-cycle latency follow the framebuffer specification; the request
// port, the registered pins and the pipeline are this design's choices.
module sram_ctrl
  import fb_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  // request / response port
  input  logic       req_valid,
  input  sram_req_t  req,
  output logic       resp_valid,
  output word_t      resp_rdata,
  // SRAM pins
  output pair_addr_t sram_addr,
  output logic       sram_ce_n,
  output logic       sram_we_n,
  output logic [3:0] sram_bw_n,
  output logic       sram_oe_n,
  output word_t      sram_dq_o,
  output logic       sram_dq_oe,
  input  word_t      sram_dq_i
);

  typedef struct packed {
    logic  valid;
    logic  write;
    word_t wdata;
  } stage_t;

  stage_t s1, s2;
  logic   s3_read;   // a read whose data is on the bus at the next edge

  always_ff @(posedge clk) begin
    if (rst) begin
      sram_ce_n  <= 1'b1;
      sram_we_n  <= 1'b1;
      sram_bw_n  <= 4'hF;
      sram_addr  <= '0;
      sram_oe_n  <= 1'b0;
      sram_dq_oe <= 1'b0;
      sram_dq_o  <= '0;
      s1         <= '0;
      s2         <= '0;
      s3_read    <= 1'b0;
      resp_valid <= 1'b0;
      resp_rdata <= '0;
    end else begin
      // command phase
      sram_ce_n <= !req_valid;
      sram_we_n <= !(req_valid && req.write);
      sram_bw_n <= (req_valid && req.write) ? ~req.bmask : 4'hF;
      sram_addr <= req.addr;
      s1        <= '{valid: req_valid, write: req.write, wdata: req.wdata};
      // wait for the SRAM to take the command
      s2        <= s1;
      // data phase for writes
      sram_dq_oe <= s2.valid && s2.write;
      sram_oe_n  <= s2.valid && s2.write;
      sram_dq_o  <= s2.wdata;
      s3_read    <= s2.valid && !s2.write;
      // data phase for reads
      resp_valid <= s3_read;
      resp_rdata <= sram_dq_i;
    end
  end

endmodule
