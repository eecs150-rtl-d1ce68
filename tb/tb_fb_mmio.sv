// tb_fb_mmio: checks the framebuffer memory-map decode and the CPU stall.
//
// Random stores in_region and outside the 0x8000_0000 .. 0x803F_FFFC region, with
// and without the write queue ready, and loads (mem_write low); coordinate,
// color, write enable and stall are compared with the address layout
// {0x80, 00, Y, X, 00}.
module tb_fb_mmio;
  import fb_pkg::*;

  logic [31:0] cpu_addr, cpu_wdata;
  logic        cpu_mem_write, CPUWriteEnable, CPUWriteReady, cpu_stall;
  coord_t      CPUCoordIn;
  pixel_t      CPUDataIn;

  fb_mmio dut (.cpu_addr, .cpu_wdata, .cpu_mem_write, .CPUCoordIn, .CPUDataIn,
               .CPUWriteEnable, .CPUWriteReady, .cpu_stall);

  int checks = 0, failures = 0;
  int n_stall = 0;

  initial begin
    for (int i = 0; i < 5000; i++) begin
      logic [9:0] y, x;
      logic       in_region, exp_we;
      y = 10'($urandom); x = 10'($urandom);
      in_region = $urandom_range(0, 1);
      cpu_addr = in_region ? {8'h80, 2'b00, y, x, 2'b00} : $urandom;
      if (!in_region && cpu_addr[31:22] == 10'h200) cpu_addr[31] = 1'b0;
      cpu_wdata = $urandom;
      cpu_mem_write = ($urandom_range(0, 3) != 0);
      CPUWriteReady = $urandom_range(0, 1);
      #1;
      exp_we = in_region && cpu_mem_write;
      checks++;
      if (CPUWriteEnable !== exp_we || cpu_stall !== (exp_we && !CPUWriteReady)) begin
        failures++;
        $display("FAIL: addr=%h we=%b -> en=%b stall=%b", cpu_addr, cpu_mem_write, CPUWriteEnable, cpu_stall);
      end
      if (exp_we) begin
        checks++;
        if (CPUCoordIn.y !== y || CPUCoordIn.x !== x || CPUDataIn !== cpu_wdata[15:0]) begin
          failures++;
          $display("FAIL: addr=%h -> y=%0d x=%0d color=%h", cpu_addr, CPUCoordIn.y, CPUCoordIn.x, CPUDataIn);
        end
      end
      if (cpu_stall) n_stall++;
    end
    checks++;
    if (n_stall == 0) begin failures++; $display("FAIL: no stall seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
