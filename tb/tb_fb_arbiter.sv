// tb_fb_arbiter: checks the fixed priority video > CPU > Line Engine.
//
// Every combination of the three request signals is applied with random
// addresses, coordinates and colors (some outside the frame). For each, the
// test checks which user is served, the take signals, and the request sent to
// the SRAM controller (read address, or write address 800*Y+X / 2, byte mask
// and data), and that out-of-frame writes are taken but not issued.
module tb_fb_arbiter;
  import fb_pkg::*;

  logic       vid_addr_valid, cpu_valid, le_valid;
  pair_addr_t vid_addr;
  pix_write_t cpu_wr, le_wr;
  logic       cpu_take, le_take, req_valid, dropped;
  sram_req_t  req;

  fb_arbiter dut (.vid_addr_valid, .vid_addr, .cpu_valid, .cpu_wr, .cpu_take,
                  .le_valid, .le_wr, .le_take, .req_valid, .req, .dropped);

  int checks = 0, failures = 0;
  int n_cases [4];  // 0 video, 1 cpu, 2 le, 3 dropped

  function automatic pix_write_t rand_wr();
    pix_write_t w;
    w.coord.y = ($urandom_range(0, 9) == 0) ? 10'($urandom_range(600, 1023)) : 10'($urandom_range(0, 599));
    w.coord.x = ($urandom_range(0, 9) == 0) ? 10'($urandom_range(800, 1023)) : 10'($urandom_range(0, 799));
    w.color   = 16'($urandom);
    return w;
  endfunction

  initial begin
    for (int i = 0; i < 4000; i++) begin
      logic       exp_cpu, exp_le, exp_req, exp_drop, exp_write;
      pix_write_t w;
      {vid_addr_valid, cpu_valid, le_valid} = 3'(i);
      vid_addr = 18'($urandom);
      cpu_wr = rand_wr();
      le_wr  = rand_wr();
      #1;
      exp_cpu = !vid_addr_valid && cpu_valid;
      exp_le  = !vid_addr_valid && !cpu_valid && le_valid;
      w = exp_cpu ? cpu_wr : le_wr;
      exp_write = exp_cpu || exp_le;
      exp_drop  = exp_write && !(w.coord.x < 800 && w.coord.y < 600);
      exp_req   = vid_addr_valid || (exp_write && !exp_drop);
      checks++;
      if (cpu_take !== exp_cpu || le_take !== exp_le || req_valid !== exp_req || dropped !== exp_drop) begin
        failures++;
        $display("FAIL: v=%b c=%b l=%b -> ctake=%b ltake=%b req=%b drop=%b",
                 vid_addr_valid, cpu_valid, le_valid, cpu_take, le_take, req_valid, dropped);
      end
      if (vid_addr_valid) begin
        n_cases[0]++;
        checks++;
        if (req.write !== 1'b0 || req.addr !== vid_addr) begin
          failures++; $display("FAIL: video read not issued correctly");
        end
      end else if (exp_write && !exp_drop) begin
        int seq;
        seq = 800 * int'(w.coord.y) + int'(w.coord.x);
        n_cases[exp_cpu ? 1 : 2]++;
        checks++;
        if (req.write !== 1'b1 || req.addr !== pair_addr_t'(seq / 2) || req.wdata !== {w.color, w.color}
            || req.bmask !== (seq[0] ? 4'b1100 : 4'b0011)) begin
          failures++; $display("FAIL: write request wrong: addr=%0d mask=%b", req.addr, req.bmask);
        end
      end else if (exp_drop) n_cases[3]++;
    end
    foreach (n_cases[k]) begin
      checks++;
      if (n_cases[k] == 0) begin failures++; $display("FAIL: case %0d never seen", k); end
    end
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
