// tb_rlgcd: end-to-end test of the whole cipher at its default size.
//
// The top runs with its defaults: the built-in 128x128 synthetic image and
// seed 0001. After reset the testbench follows one complete image (16,384
// pixels, one per clock) and then 100 pixels of the next pass, and checks
// in every cycle:
//   - pix_addr counts up by one per clock and wraps after 16,383, so a whole
//     image takes exactly 16,384 cycles;
//   - inn is the synthetic pixel (2r + 3c) xor (r*c) of that address;
//   - key_en and key_de both equal an arithmetic model of the XNOR LFSR;
//   - en equals a reference cipher written as bit equations;
//   - de equals inn (the image is recovered).
// It counts how often each mechanism of the design happened: the key
// changing from one pixel to the next, the LFSR completing its 15-state
// period, the image address wrapping, encryption changing a pixel, and a
// reset in mid-image returning to pixel 0 and seed 0001. Any of these that
// never happened is a failure. A watchdog ends the run after 40000 cycles.
module tb_rlgcd;
  import rlgcd_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic        rst;
  pixel_t      inn, en, de;
  key_t        key_en, key_de;
  logic [13:0] pix_addr;

  rlgcd dut (.clk, .rst, .inn, .pix_addr, .key_en, .key_de, .en, .de);

  function automatic pixel_t ref_enc(pixel_t i, key_t k);
    logic su, sl;
    logic [3:0] hi, lo;
    su = i[4] ^ (i[7] & (i[6] | i[5]));
    sl = i[0] ^ (i[3] & (i[2] | i[1]));
    hi = i[7] ? {1'b1, i[6] ^ i[5], i[6], su} : {1'b0, i[6], i[5], su};
    lo = i[2] ? {su ^ i[3], 1'b1, sl ^ i[1], i[1]} : {su ^ i[3], 1'b0, i[1], sl};
    return {hi ^ k, lo ^ k};
  endfunction

  function automatic key_t model_next(key_t s);
    return key_t'((int'(s) * 2) % 16 + ((s[3] == s[2]) ? 1 : 0));
  endfunction

  task automatic check(input logic cond, input string what, input int n);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s at cycle %0d: addr=%0d inn=%b key=%b/%b en=%b de=%b",
                 what, n, pix_addr, inn, key_en, key_de, en, de);
    end
  endtask

  task automatic need(input int count, input string what);
    checks++;
    $display("mechanism %-28s happened %0d times", what, count);
    if (count == 0) begin failures++; $display("FAIL mechanism never happened: %s", what); end
  endtask

  initial begin
    key_t   mkey, prev_key;
    int     n_key_change, n_lfsr_period, n_img_wrap, n_changed, n_reset, cycles_per_image;
    n_key_change = 0; n_lfsr_period = 0; n_img_wrap = 0; n_changed = 0; n_reset = 0;
    cycles_per_image = 0;

    rst = 1'b1;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    mkey = 4'b0001;
    prev_key = mkey;
    for (int n = 0; n < 16384 + 100; n++) begin
      int i, r, c;
      i = n % 16384;
      r = i / 128;
      c = i % 128;
      check(int'(pix_addr) == i, "pixel address", n);
      check(inn == 8'((2 * r + 3 * c) ^ (r * c)), "image pixel", n);
      check(key_en == mkey && key_de == mkey, "keys", n);
      check(en == ref_enc(inn, mkey), "cipher pixel", n);
      check(de == inn, "recovered pixel", n);
      if (n > 0 && key_en != prev_key) n_key_change++;
      if (n > 0 && n % 15 == 0 && key_en == 4'b0001) n_lfsr_period++;
      if (n > 0 && pix_addr == 0) begin
        n_img_wrap++;
        cycles_per_image = n;
      end
      if (en != inn) n_changed++;
      prev_key = key_en;
      mkey = model_next(mkey);
      @(posedge clk); #1;
    end
    check(cycles_per_image == 16384, "one image per 16384 cycles", cycles_per_image);

    // reset in the middle of the second pass
    rst = 1'b1;
    @(posedge clk); #1 rst = 1'b0;
    if (pix_addr == 0 && key_en == 4'b0001 && key_de == 4'b0001) n_reset++;
    check(de == inn && inn == 8'h00, "first pixel after reset", 0);

    need(n_key_change,  "key change per pixel");
    need(n_lfsr_period, "LFSR period completed");
    need(n_img_wrap,    "image address wrap");
    need(n_changed,     "pixel changed by cipher");
    need(n_reset,       "reset mid-image");
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
