// tb_fb_system: end-to-end test of the framebuffer and video subsystem at its
// default (full) size: 800x600 pixels, 256K-word SRAM, SVGA timing.
//
// A CPU model stores the even-X pixels of the whole frame through the memory
// map (address {0x80,00,Y,X,00}), holding each store while cpu_stall is high.
// A Line Engine model writes the odd-X pixels bottom-up through its write port,
// holding each write while le_ready is low. The two writers therefore fill the
// two halves of every SRAM word in an unrelated order, which only works if the
// byte masks protect the other pixel. The CPU finally stores a few pixels
// outside the 800x600 frame, which must be discarded. Meanwhile the video
// interface keeps scanning. Once all writes have drained, the next complete
// displayed frame is compared pixel by pixel with the image that was written.
//
// Clocks (periods): fb_clk 100, le_clk 100 (other phase), cpu_clk 90,
// pix_clk 202. The writers together offer more than the SRAM has left over
// after video reads, so both must stall. The test counts and requires at
// least once: CPU stalls, Line Engine not-ready cycles, a video read beating a
// CPU write, a CPU write beating a Line Engine write, even- and odd-pixel byte
// masks, read-to-write and write-to-read turnarounds on the SRAM bus, a
// discarded out-of-frame write, and the video address wrapping to pair 0.
module tb_fb_system;
  import fb_pkg::*;

  logic fb_clk = 0, le_clk = 0, cpu_clk = 0, pix_clk = 0, rst = 1;
  always #50 fb_clk = !fb_clk;
  initial begin #25; forever #50 le_clk = !le_clk; end
  always #45 cpu_clk = !cpu_clk;
  always #101 pix_clk = !pix_clk;

  logic [31:0] cpu_addr, cpu_wdata;
  logic        cpu_mem_write, cpu_stall;
  coord_t      le_coord;
  pixel_t      le_color;
  logic        le_write, le_ready;
  pair_addr_t  sram_addr;
  logic        sram_ce_n, sram_we_n, sram_oe_n, sram_dq_oe, mdrive;
  logic [3:0]  sram_bw_n;
  word_t       sram_dq_o, mdq, sram_dq_i;
  logic [23:0] rgb;
  logic        hsync, vsync, de, video_underflow, wr_dropped;

  fb_system dut (.*);

  zbt_sram_model sram (
    .clk(fb_clk), .addr(sram_addr), .ce_n(sram_ce_n), .we_n(sram_we_n), .bw_n(sram_bw_n),
    .oe_n(sram_oe_n), .dq_i(sram_dq_i), .dq_o(mdq), .dq_drive(mdrive)
  );
  assign sram_dq_i = sram_dq_oe ? sram_dq_o : (mdrive ? mdq : 32'h0BAD_0BAD);

  int checks = 0, failures = 0;

  function automatic pixel_t color_of(input int y, input int x);
    logic [31:0] h;
    h = (y * 1024 + x + 1) * 32'h9E37_79B1;
    return h[31:16] ^ h[15:0];
  endfunction
  function automatic logic [23:0] pad(input pixel_t p);
    return {p[15:11], 3'b0, p[10:5], 2'b0, p[4:0], 3'b0};
  endfunction

  // ---------------- CPU model ----------------
  localparam int N_OUT = 8;   // out-of-frame stores at the end
  int  cpu_n = 0;              // index of the store being presented
  bit  cpu_done = 0;

  function automatic void cpu_store(input int n);
    int y, x;
    if (n < 240000) begin
      y = n / 400; x = 2 * (n % 400);
    end else begin
      y = n % 4; x = 800 + 7 * (n % 29);      // outside the frame
    end
    cpu_addr  = {8'h80, 2'b00, 10'(y), 10'(x), 2'b00};
    cpu_wdata = {16'hFFFF, (n < 240000) ? color_of(y, x) : 16'h1234};
  endfunction

  always @(posedge cpu_clk) begin
    if (!rst && !cpu_done) begin
      if (cpu_mem_write && !cpu_stall) begin
        cpu_n = cpu_n + 1;
        if (cpu_n == 240000 + N_OUT) cpu_done = 1;
      end
      #1;
      cpu_mem_write = !cpu_done;
      if (!cpu_done) cpu_store(cpu_n);
    end
  end

  // ---------------- Line Engine model ----------------
  int le_n = 0;
  bit le_done = 0;
  always @(posedge le_clk) begin
    if (!rst && !le_done) begin
      if (le_write && le_ready) begin
        le_n = le_n + 1;
        if (le_n == 240000) le_done = 1;
      end
      #1;
      le_write = !le_done;
      if (!le_done) begin
        le_coord = '{y: 10'(599 - le_n / 400), x: 10'(2 * (le_n % 400) + 1)};
        le_color = color_of(599 - le_n / 400, 2 * (le_n % 400) + 1);
      end
    end
  end

  // ---------------- mechanism counters (fb_clk) ----------------
  int n_cpu_stall = 0, n_le_wait = 0, n_vid_over_cpu = 0, n_cpu_over_le = 0;
  int n_even = 0, n_odd = 0, n_rw = 0, n_wr = 0, n_drop = 0, n_wrap = 0;
  logic prev_rd = 0, prev_wr = 0;

  always @(posedge cpu_clk) if (!rst && cpu_mem_write && cpu_stall) n_cpu_stall++;
  always @(posedge le_clk) if (!rst && le_write && !le_ready) n_le_wait++;
  always @(posedge fb_clk) if (!rst) begin
    logic rd, wr;
    if (dut.vid_addr_valid && dut.cpu_head_valid) n_vid_over_cpu++;
    if (dut.cpu_take && dut.le_head_valid) n_cpu_over_le++;
    if (wr_dropped) n_drop++;
    if (dut.vid_addr_valid && dut.vid_addr == pair_addr_t'(239999)) n_wrap++;
    rd = !sram_ce_n && sram_we_n;
    wr = !sram_ce_n && !sram_we_n;
    if (wr && sram_bw_n == 4'b1100) n_even++;
    if (wr && sram_bw_n == 4'b0011) n_odd++;
    if (prev_rd && wr) n_rw++;
    if (prev_wr && rd) n_wr++;
    prev_rd = rd; prev_wr = wr;
    if (sram_dq_oe && mdrive) begin
      failures++; $display("FAIL: SRAM bus contention");
    end
  end

  // ---------------- display checker ----------------
  bit   checking = 0, frame_done = 0;
  int   pidx = 0, color_errors = 0;
  logic vs_d = 0;

  always @(posedge pix_clk) if (!rst) begin
    if (checking && de) begin
      checks++;
      if (rgb !== pad(color_of(pidx / 800, pidx % 800))) begin
        color_errors++;
        if (color_errors <= 5)
          $display("FAIL: pixel (%0d,%0d) shows %h expected %h", pidx / 800, pidx % 800,
                   rgb, pad(color_of(pidx / 800, pidx % 800)));
      end
      pidx++;
      if (pidx == 480000) begin checking = 0; frame_done = 1; end
    end
    vs_d <= vsync;
  end

  initial begin
    cpu_mem_write = 0; cpu_addr = 0; cpu_wdata = 0;
    le_write = 0; le_coord = '0; le_color = '0;
    repeat (8) @(posedge cpu_clk);
    rst = 0;
    wait (cpu_done && le_done);
    // let the queues drain
    repeat (200) @(posedge fb_clk);
    checks++;
    if (dut.cpu_head_valid || dut.le_head_valid) begin failures++; $display("FAIL: queues not drained"); end
    // wait for the start of the next frame, then check it whole
    @(posedge vsync);
    checking = 1;
    wait (frame_done);
    if (color_errors != 0) begin failures += color_errors; $display("FAIL: %0d wrong pixels", color_errors); end
    checks++;
    if (video_underflow) begin failures++; $display("FAIL: video underflow"); end
    $display("cpu_stall=%0d le_wait=%0d video>cpu=%0d cpu>le=%0d even=%0d odd=%0d rd->wr=%0d wr->rd=%0d dropped=%0d wraps=%0d",
             n_cpu_stall, n_le_wait, n_vid_over_cpu, n_cpu_over_le, n_even, n_odd, n_rw, n_wr, n_drop, n_wrap);
    checks++; if (n_cpu_stall == 0)    begin failures++; $display("FAIL: CPU never stalled"); end
    checks++; if (n_le_wait == 0)      begin failures++; $display("FAIL: Line Engine never waited"); end
    checks++; if (n_vid_over_cpu == 0) begin failures++; $display("FAIL: video never beat CPU"); end
    checks++; if (n_cpu_over_le == 0)  begin failures++; $display("FAIL: CPU never beat Line Engine"); end
    checks++; if (n_even == 0 || n_odd == 0) begin failures++; $display("FAIL: byte masks not both used"); end
    checks++; if (n_rw == 0 || n_wr == 0)     begin failures++; $display("FAIL: bus turnarounds missing"); end
    checks++; if (n_drop != N_OUT)     begin failures++; $display("FAIL: %0d writes dropped, expected %0d", n_drop, N_OUT); end
    checks++; if (n_wrap == 0)         begin failures++; $display("FAIL: video address never wrapped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6_000_000) @(posedge fb_clk);
    failures++;
    $display("FAIL: watchdog (cpu %0d le %0d pixels checked %0d)", cpu_n, le_n, pidx);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
