// tb_sram_ctrl: self-checking test of sram_ctrl against the ZBT SRAM model.
//
// Issues random mixes of reads and byte-masked writes on every cycle (with
// occasional idle cycles) over a small address window so that reads often
// follow writes to the same word. A reference memory, updated when each write
// is issued, predicts every read; each response must arrive exactly 3 cycles
// after its request and carry the predicted word. The controller's and the
// SRAM's data drivers must never be on at the same time.
module tb_sram_ctrl;
  import fb_pkg::*;

  localparam int unsigned LAT = 3;

  logic clk = 0, rst = 1;
  always #5 clk = !clk;

  logic       req_valid;
  sram_req_t  req;
  logic       resp_valid;
  word_t      resp_rdata;
  pair_addr_t sram_addr;
  logic       sram_ce_n, sram_we_n, sram_oe_n, sram_dq_oe, mdrive;
  logic [3:0] sram_bw_n;
  word_t      sram_dq_o, mdq, bus;

  sram_ctrl dut (
    .clk, .rst, .req_valid, .req, .resp_valid, .resp_rdata,
    .sram_addr, .sram_ce_n, .sram_we_n, .sram_bw_n, .sram_oe_n,
    .sram_dq_o, .sram_dq_oe, .sram_dq_i(bus)
  );

  zbt_sram_model mem (
    .clk, .addr(sram_addr), .ce_n(sram_ce_n), .we_n(sram_we_n), .bw_n(sram_bw_n),
    .oe_n(sram_oe_n), .dq_i(bus), .dq_o(mdq), .dq_drive(mdrive)
  );

  assign bus = sram_dq_oe ? sram_dq_o : (mdrive ? mdq : 32'hDEAD_BEEF);

  int checks = 0, failures = 0;
  int cycle = 0;
  word_t ref_mem [64];
  // expected read responses, indexed by the cycle they are due
  word_t exp_data [int];
  int n_reads = 0, n_writes = 0, n_rw = 0, n_wr = 0;

  always @(posedge clk) cycle <= cycle + 1;

  always @(negedge clk) if (!rst) begin
    if (sram_dq_oe && mdrive) begin
      failures++;
      $display("FAIL: bus contention at cycle %0d", cycle);
    end
    if (resp_valid) begin
      checks++;
      if (!exp_data.exists(cycle)) begin
        failures++;
        $display("FAIL: unexpected response at cycle %0d", cycle);
      end else if (exp_data[cycle] !== resp_rdata) begin
        failures++;
        $display("FAIL: cycle %0d read %h expected %h", cycle, resp_rdata, exp_data[cycle]);
      end
      exp_data.delete(cycle);
    end else if (exp_data.exists(cycle)) begin
      failures++; checks++;
      $display("FAIL: missing response at cycle %0d", cycle);
      exp_data.delete(cycle);
    end
  end

  initial begin
    logic last_write, last_valid;
    last_write = 0; last_valid = 0;
    for (int i = 0; i < 64; i++) ref_mem[i] = '0;
    req_valid = 0; req = '0;
    repeat (4) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      req_valid = ($urandom_range(0, 9) != 0);
      req.write = $urandom_range(0, 1);
      req.addr  = pair_addr_t'($urandom_range(0, 63));
      req.wdata = $urandom;
      req.bmask = 4'($urandom);
      if (req_valid) begin
        if (req.write) begin
          for (int b = 0; b < 4; b++)
            if (req.bmask[b]) ref_mem[req.addr][8*b +: 8] = req.wdata[8*b +: 8];
          n_writes++;
          if (last_valid && !last_write) n_rw++;
        end else begin
          // the request is accepted at the coming edge (cycle+1 after it);
          // the response is visible LAT cycles later
          exp_data[cycle + LAT + 1] = ref_mem[req.addr];
          n_reads++;
          if (last_valid && last_write) n_wr++;
        end
      end
      last_valid = req_valid; last_write = req.write;
    end
    @(negedge clk); req_valid = 0;
    repeat (10) @(posedge clk);
    checks++;
    if (exp_data.num() != 0) begin
      failures++;
      $display("FAIL: %0d responses never arrived", exp_data.num());
    end
    checks++;
    if (n_rw == 0 || n_wr == 0) begin
      failures++;
      $display("FAIL: read/write turnarounds not exercised");
    end
    $display("reads=%0d writes=%0d read->write=%0d write->read=%0d", n_reads, n_writes, n_rw, n_wr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
