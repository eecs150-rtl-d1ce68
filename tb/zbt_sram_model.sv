// zbt_sram_model: behavioural model of a pipelined ZBT SRAM (256K x 32 data
// bits; the parity bits are not modelled), for simulation only.
//
// A command (CE#, WE#, BW#[3:0], address) is sampled at a rising edge k. A read
// drives the addressed word on dq_o, with dq_drive high, from edge k+1 to edge
// k+2, so the controller samples it at k+2. A write takes its data from dq_i at
// edge k+2 and stores the bytes whose BW# was low at edge k. A read issued one
// cycle after a write to the same word sees the new data, as the real device
// forwards it internally. OE# gates the output drivers asynchronously.
// Reads and writes may follow each other in any order on every cycle.
module zbt_sram_model #(
  parameter int unsigned AW = 18
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          ce_n,
  input  logic          we_n,
  input  logic [3:0]    bw_n,
  input  logic          oe_n,
  input  logic [31:0]   dq_i,
  output logic [31:0]   dq_o,
  output logic          dq_drive
);

  typedef struct packed {
    logic          active;
    logic          write;
    logic [AW-1:0] addr;
    logic [3:0]    bw_n;
  } cmd_t;

  logic [31:0] mem [1 << AW];
  cmd_t        c1 = '0, c2 = '0;
  logic        rd_drive = 1'b0;

  function automatic logic [31:0] merge(input logic [31:0] old, input logic [31:0] nw,
                                        input logic [3:0] bwn);
    logic [31:0] r = old;
    for (int b = 0; b < 4; b++) if (!bwn[b]) r[8*b +: 8] = nw[8*b +: 8];
    return r;
  endfunction

  initial for (int i = 0; i < (1 << AW); i++) mem[i] = '0;

  always @(posedge clk) begin
    c1 <= '{active: !ce_n, write: !we_n, addr: addr, bw_n: bw_n};
    c2 <= c1;
    // read data phase (command sampled at the previous edge)
    rd_drive <= c1.active && !c1.write;
    if (c1.active && !c1.write) begin
      if (c2.active && c2.write && c2.addr == c1.addr)
        dq_o <= merge(mem[c1.addr], dq_i, c2.bw_n);
      else
        dq_o <= mem[c1.addr];
    end
    // write data phase (command sampled two edges ago)
    if (c2.active && c2.write)
      mem[c2.addr] <= merge(mem[c2.addr], dq_i, c2.bw_n);
  end

  assign dq_drive = rd_drive && !oe_n;

  // backdoor read for testbenches
  function automatic logic [31:0] peek(input logic [AW-1:0] a);
    return mem[a];
  endfunction

endmodule
