// tb_video: runs the video interface at its default 800x600@75Hz timing for
// two full frames.
//
// The framebuffer side is modelled by a responder that answers every
// AddressValid with the word for that pair address exactly 3 fb_clk cycles
// later, as the SRAM controller does. Each pixel's color is a hash of its
// raster index, so every displayed pixel can be predicted. Clocks: fb_clk
// period 100, pix_clk period 202 (100 MHz and 49.5 MHz).
// Checked: each displayed pixel's 24-bit color and its order, 800 pixels per
// line and 600 lines per frame, hsync and vsync widths, offsets and periods
// (1056 clocks, 625 lines), no FIFO underflow, sequential read addresses with
// a wrap after pair 239999, and the read rate: 400 reads per visible line
// period (one per two pixel clocks, about one per four fb_clk cycles), none
// during vertical sync, 240000 per frame.
module tb_video;
  import fb_pkg::*;

  localparam int H_TOTAL = 1056, V_TOTAL = 625;
  localparam int PAIRS   = 240000;
  localparam int LAT     = 3;

  logic rst = 1, fb_clk = 0, pix_clk = 0;
  always #50 fb_clk = !fb_clk;
  always #101 pix_clk = !pix_clk;

  pair_addr_t  Address;
  logic        AddressValid, PixelsValid;
  word_t       Pixels;
  logic [23:0] rgb;
  logic        hsync, vsync, de, underflow;

  video dut (.*);

  int checks = 0, failures = 0;

  function automatic pixel_t pix_of(input int idx);
    logic [31:0] h;
    h = idx * 32'h9E37_79B1;
    return h[31:16] ^ h[15:0];
  endfunction
  function automatic logic [23:0] pad(input pixel_t p);
    return {p[15:11], 3'b0, p[10:5], 2'b0, p[4:0], 3'b0};
  endfunction

  // ---- framebuffer responder with fixed latency ----
  logic [LAT-1:0] vpipe;
  pair_addr_t     apipe [LAT];
  int             reads = 0, expect_addr = 0, addr_errors = 0;

  // reads while vsync is high (vertical blanking, buffer already full)
  int vblank_reads = 0;
  always @(posedge fb_clk) if (!rst && AddressValid && vsync && frames >= 1) vblank_reads++;

  always @(posedge fb_clk) begin
    if (rst) begin
      vpipe <= '0;
      PixelsValid <= 0;
    end else begin
      if (AddressValid) begin
        reads++;
        if (int'(Address) != expect_addr) addr_errors++;
        expect_addr = (expect_addr + 1) % PAIRS;
      end
      vpipe[0] <= AddressValid;
      apipe[0] <= Address;
      for (int i = 1; i < LAT; i++) begin
        vpipe[i] <= vpipe[i-1];
        apipe[i] <= apipe[i-1];
      end
      PixelsValid <= vpipe[LAT-1];
      Pixels      <= {pix_of(2 * int'(apipe[LAT-1]) + 1), pix_of(2 * int'(apipe[LAT-1]))};
    end
  end

  // ---- display checker ----
  int pcycle = 0, idx = 0, frames = 0;
  int line_pix = 0, lines = 0;
  logic de_d = 0, hs_d = 0, vs_d = 0;
  int last_de_fall = -1, last_hs_rise = -1, last_vs_rise = -1, hs_rise_cnt = 0;
  int de_errors = 0, color_errors = 0, sync_errors = 0;
  int reads_at_vs [$];
  int reads_at_hs = 0, rate_errors = 0, line_checks = 0;

  always @(posedge pix_clk) if (!rst) begin
    pcycle++;
    if (de) begin
      checks++;
      if (rgb !== pad(pix_of(idx))) begin
        color_errors++;
        if (color_errors < 5) $display("FAIL: pixel %0d color %h expected %h", idx, rgb, pad(pix_of(idx)));
      end
      idx = (idx + 1) % (2 * PAIRS);
      line_pix++;
    end
    if (de_d && !de) begin
      if (line_pix != 800) de_errors++;
      line_pix = 0;
      lines++;
      last_de_fall = pcycle;
    end
    if (hsync && !hs_d) begin
      // during visible lines each line period must cost exactly 400 reads
      if (frames >= 1 && lines >= 10 && lines <= 590) begin
        line_checks++;
        if (reads - reads_at_hs > 401 || reads - reads_at_hs < 399) begin
          rate_errors++;
          if (rate_errors < 5) $display("FAIL: %0d reads in line %0d", reads - reads_at_hs, lines);
        end
      end
      reads_at_hs = reads;
      if (last_de_fall > 0 && lines > 0 && !vsync && pcycle - last_de_fall != 16 && pcycle - last_de_fall < 1056)
        sync_errors++;
      if (last_hs_rise > 0 && pcycle - last_hs_rise != H_TOTAL) sync_errors++;
      last_hs_rise = pcycle;
      hs_rise_cnt++;
    end
    if (!hsync && hs_d && last_hs_rise > 0 && pcycle - last_hs_rise != 80) sync_errors++;
    if (vsync && !vs_d) begin
      if (last_vs_rise > 0) begin
        if (pcycle - last_vs_rise != H_TOTAL * V_TOTAL) sync_errors++;
        if (lines != 600) begin
          de_errors++;
          $display("FAIL: %0d lines in frame", lines);
        end
        frames++;
      end
      lines = 0;
      last_vs_rise = pcycle;
      reads_at_vs.push_back(reads);
    end
    if (!vsync && vs_d && pcycle - last_vs_rise != 3 * H_TOTAL) sync_errors++;
    de_d <= de; hs_d <= hsync; vs_d <= vsync;
  end

  initial begin
    repeat (5) @(posedge pix_clk);
    rst = 0;
    wait (frames == 2);
    if (color_errors != 0) begin failures += color_errors; $display("FAIL: %0d color errors", color_errors); end
    checks++; if (de_errors != 0) begin failures++; $display("FAIL: %0d line/frame size errors", de_errors); end
    checks++; if (sync_errors != 0) begin failures++; $display("FAIL: %0d sync timing errors", sync_errors); end
    checks += line_checks;
    if (line_checks == 0 || rate_errors != 0) begin
      failures += rate_errors + 1; $display("FAIL: read rate per line (%0d errors of %0d)", rate_errors, line_checks);
    end
    checks++;
    if (vblank_reads != 0) begin failures++; $display("FAIL: %0d reads during vsync", vblank_reads); end
    checks++; if (underflow) begin failures++; $display("FAIL: underflow"); end
    checks++; if (addr_errors != 0) begin failures++; $display("FAIL: %0d address sequence errors", addr_errors); end
    checks++; if (idx != 0) begin failures++; $display("FAIL: pixel count %0d not whole frames", idx); end
    checks++;
    if (reads_at_vs[2] - reads_at_vs[1] != PAIRS) begin
      failures++; $display("FAIL: %0d reads in one frame", reads_at_vs[2] - reads_at_vs[1]);
    end
    $display("frames=%0d reads=%0d hsyncs=%0d", frames, reads, hs_rise_cnt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2 * 3 * H_TOTAL * V_TOTAL) @(posedge pix_clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
