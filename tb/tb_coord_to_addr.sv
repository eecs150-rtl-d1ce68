// tb_coord_to_addr: checks the coordinate translation against 800*Y+X.
//
// Sweeps the corners and every row start/end, then random coordinates over
// the whole 10-bit range, and compares pair address, byte mask, replicated
// write data and the in-frame flag with values computed here with an ordinary
// multiply.
module tb_coord_to_addr;
  import fb_pkg::*;

  coord_t     coord;
  pixel_t     color;
  pair_addr_t pair_addr;
  word_t      wdata;
  logic [3:0] bmask;
  logic       in_range;

  coord_to_addr dut (.coord, .color, .pair_addr, .wdata, .bmask, .in_range);

  int checks = 0, failures = 0;

  task automatic check_one(input int y, input int x);
    int seq;
    coord = '{y: 10'(y), x: 10'(x)};
    color = 16'($urandom);
    #1;
    seq = 800 * y + x;
    checks++;
    if (in_range !== (x < 800 && y < 600)) begin
      failures++; $display("FAIL: in_range y=%0d x=%0d", y, x);
    end
    if (x < 800 && y < 600) begin
      checks++;
      if (pair_addr !== pair_addr_t'(seq / 2) || bmask !== ((seq % 2) ? 4'b1100 : 4'b0011)
          || wdata !== {color, color}) begin
        failures++;
        $display("FAIL: y=%0d x=%0d addr=%0d mask=%b (expected %0d)", y, x, pair_addr, bmask, seq / 2);
      end
    end
  endtask

  initial begin
    for (int y = 0; y < 600; y++) begin
      check_one(y, 0); check_one(y, 1); check_one(y, 798); check_one(y, 799);
    end
    check_one(600, 0); check_one(0, 800); check_one(1023, 1023);
    for (int i = 0; i < 20000; i++) check_one($urandom_range(0, 1023), $urandom_range(0, 1023));
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
