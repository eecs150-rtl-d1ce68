// tb_write_fifos: checks both write queues across three unrelated clocks.
//
// The CPU side (period 14) and Line Engine side (period 10) each offer a
// numbered sequence of pixel writes, holding a write while WriteReady is low as
// a stalled writer would. The framebuffer side (period 8) dequeues with Take at
// random, slow at first so that both queues fill. Every dequeued entry must be
// the next one of its sequence, with the right coordinate and color, both
// queues must report full (ready low) at some point, and all entries must
// arrive. The queue depth is the default 16.
module tb_write_fifos;
  import fb_pkg::*;

  localparam int N = 600;

  logic rst = 1, fb_clk = 0, cpu_clk = 0, le_clk = 0;
  always #4 fb_clk = !fb_clk;
  always #7 cpu_clk = !cpu_clk;
  always #5 le_clk = !le_clk;

  coord_t CPUCoordIn, LECoordIn, CPUCoordOut, LECoordOut;
  pixel_t CPUDataIn, LEDataIn, CPUDataOut, LEDataOut;
  logic   CPUWriteEnable, CPUWriteReady, CPUValidRequest, CPUTake;
  logic   LEWriteEnable, LEWriteReady, LEValidRequest, LETake;

  write_fifos dut (.*);

  int checks = 0, failures = 0;
  int cpu_sent = 0, le_sent = 0, cpu_got = 0, le_got = 0;
  int cpu_full = 0, le_full = 0;
  int fb_cycle = 0;

  // item k of a stream: coordinate and color derived from k
  function automatic coord_t item_coord(input int k, input int s);
    return '{y: 10'(k * 7 + s), x: 10'(k * 3 + 100 * s)};
  endfunction
  function automatic pixel_t item_color(input int k, input int s);
    return 16'(k * 41 + s * 16'h8000);
  endfunction

  // CPU writer
  always @(posedge cpu_clk) begin
    if (rst) begin
      CPUWriteEnable <= 0;
    end else begin
      if (CPUWriteEnable && CPUWriteReady) cpu_sent = cpu_sent + 1;
      if (CPUWriteEnable && !CPUWriteReady) cpu_full++;
      if (!(CPUWriteEnable && !CPUWriteReady)) begin
        CPUWriteEnable <= (cpu_sent < N) && ($urandom_range(0, 3) != 0);
        CPUCoordIn     <= item_coord(cpu_sent, 0);
        CPUDataIn      <= item_color(cpu_sent, 0);
      end
    end
  end

  // Line Engine writer
  always @(posedge le_clk) begin
    if (rst) begin
      LEWriteEnable <= 0;
    end else begin
      if (LEWriteEnable && LEWriteReady) le_sent = le_sent + 1;
      if (LEWriteEnable && !LEWriteReady) le_full++;
      if (!(LEWriteEnable && !LEWriteReady)) begin
        LEWriteEnable <= (le_sent < N) && ($urandom_range(0, 3) != 0);
        LECoordIn     <= item_coord(le_sent, 1);
        LEDataIn      <= item_color(le_sent, 1);
      end
    end
  end

  // framebuffer side: decide takes at the falling edge, check at the rising one
  always @(negedge fb_clk) begin
    int rate;
    rate = (fb_cycle < 2000) ? 12 : 2;
    CPUTake = !rst && CPUValidRequest && ($urandom_range(0, rate - 1) == 0);
    LETake  = !rst && LEValidRequest && ($urandom_range(0, rate - 1) == 0);
  end

  always @(posedge fb_clk) begin
    fb_cycle <= fb_cycle + 1;
    if (!rst && CPUTake) begin
      checks++;
      if (CPUCoordOut !== item_coord(cpu_got, 0) || CPUDataOut !== item_color(cpu_got, 0)) begin
        failures++;
        $display("FAIL: CPU entry %0d wrong (%h %h)", cpu_got, CPUCoordOut, CPUDataOut);
      end
      cpu_got++;
    end
    if (!rst && LETake) begin
      checks++;
      if (LECoordOut !== item_coord(le_got, 1) || LEDataOut !== item_color(le_got, 1)) begin
        failures++;
        $display("FAIL: LE entry %0d wrong (%h %h)", le_got, LECoordOut, LEDataOut);
      end
      le_got++;
    end
  end

  initial begin
    CPUTake = 0; LETake = 0;
    repeat (6) @(posedge cpu_clk);
    rst = 0;
    wait (cpu_got == N && le_got == N);
    repeat (20) @(posedge fb_clk);
    checks++;
    if (CPUValidRequest || LEValidRequest) begin failures++; $display("FAIL: queues not empty"); end
    checks++;
    if (cpu_full == 0 || le_full == 0) begin
      failures++; $display("FAIL: full not reached (cpu %0d, le %0d)", cpu_full, le_full);
    end
    $display("cpu full cycles=%0d le full cycles=%0d", cpu_full, le_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge fb_clk);
    failures++;
    $display("FAIL: watchdog (cpu %0d/%0d le %0d/%0d)", cpu_got, cpu_sent, le_got, le_sent);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
