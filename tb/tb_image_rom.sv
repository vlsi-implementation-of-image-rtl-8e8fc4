// tb_image_rom: self-checking test of the image ROM.
//
// Instance 1 uses the default size and the built-in synthetic image: for one
// whole image plus a few pixels it checks, cycle by cycle, that addr counts
// 0..16383 and wraps to 0, and that out equals (2r + 3c) xor (r*c) mod 256.
// Instance 2 is loaded from a 16-word file of binary pixel values and must
// play them back in order and wrap after the last one. A reset in mid-run
// must return both to address 0. A watchdog ends the run after 40000 cycles.
module tb_image_rom;
  import rlgcd_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic rst;
  pixel_t out1, out2;
  logic [13:0] addr1;
  logic [3:0]  addr2;

  image_rom dut1 (.clk, .rst, .out(out1), .addr(addr1));
  image_rom #(.DEPTH(16), .INIT_FILE("tb/sample_pixels.mem"))
            dut2 (.clk, .rst, .out(out2), .addr(addr2));

  pixel_t sample [16] = '{8'h6F, 8'h6C, 8'h6A, 8'h63, 8'h9F, 8'hB0, 8'hAD, 8'hB3,
                          8'hB6, 8'hBC, 8'hBA, 8'hB7, 8'hBB, 8'hB3, 8'h76, 8'h74};

  task automatic check(input logic cond, input string what, input int n);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at step %0d: addr1=%0d out1=%h addr2=%0d out2=%h",
                                  what, n, addr1, out1, addr2, out2);
    end
  endtask

  initial begin
    int wraps;
    wraps = 0;
    rst = 1'b1;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int n = 0; n < 16384 + 40; n++) begin
      int i, r, c;
      i = n % 16384;
      r = i / 128;
      c = i % 128;
      check(int'(addr1) == i, "address 1", n);
      check(out1 == 8'((2 * r + 3 * c) ^ (r * c)), "synthetic pixel", n);
      check(int'(addr2) == n % 16, "address 2", n);
      check(out2 == sample[n % 16], "file pixel", n);
      if (n > 0 && i == 0) wraps++;
      @(posedge clk); #1;
    end
    check(wraps == 1, "image wrapped once", 0);
    rst = 1'b1;
    @(posedge clk); #1 rst = 1'b0;
    check(addr1 == 0 && addr2 == 0, "reset to address 0", 0);
    check(out1 == 8'h00 && out2 == sample[0], "pixel 0 after reset", 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
