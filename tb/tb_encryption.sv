// tb_encryption: self-checking test of the encryption block.
//
// Part 1 replays the six pixels of the published timing diagram right after
// reset and compares en with the six encrypted values printed there.
// Part 2 applies every (pixel, key) pair: the pixel is changed each cycle so
// that over 256 x 15 cycles each of the 15 key states meets each of the 256
// pixels once. en is compared with a reference written as bit equations
// (not as a gate netlist), the key output with an arithmetic LFSR model, and
// for every key the 256 cipher values must all differ (the cipher is a
// permutation of the pixel values). A watchdog ends the run after 10000
// cycles.
module tb_encryption;
  import rlgcd_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic   rst;
  pixel_t inn, en;
  key_t   key;

  encryption dut (.clk, .rst, .inn, .en, .key);

  // Upper nibble: Toffoli then Fredkin on (i7,i6,i5) reduce to
  // i7=0: (0,i6,i5); i7=1: (1, i6^i5, i6). Bit 4: i4 ^ i7(i6|i5).
  // Lower nibble on (i2, i1, s) with s = i0 ^ i3(i2|i1):
  // i2=0: (0,i1,s); i2=1: (1, s^i1, i1). Bit 3: upper bit 4 ^ i3.
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

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s: inn=%b key=%b en=%b", what, inn, key, en);
    end
  endtask

  initial begin
    pixel_t pub_in [6] = '{8'b01101111, 8'b01101100, 8'b01101010,
                           8'b01100011, 8'b10011111, 8'b10110000};
    pixel_t pub_en [6] = '{8'b01111110, 8'b01011101, 8'b00011100,
                           8'b10001101, 8'b01001010, 8'b01111011};
    key_t   mkey;
    bit     seen [15][256];
    int     kidx;

    rst = 1'b1; inn = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int n = 0; n < 6; n++) begin
      inn = pub_in[n];
      #1;
      check(en == pub_en[n], "published cipher value");
      @(posedge clk); #1;
    end

    rst = 1'b1;
    @(posedge clk); #1 rst = 1'b0;
    mkey = 4'b0001;
    foreach (seen[a, b]) seen[a][b] = 1'b0;
    for (int n = 0; n < 256 * 15; n++) begin
      inn  = pixel_t'(n / 15);
      kidx = n % 15;
      #1;
      check(key == mkey, "key sequence");
      check(en == ref_enc(inn, key), "cipher equations");
      checks++;
      if (seen[kidx][en]) begin failures++; $display("FAIL collision key=%b en=%b", key, en); end
      seen[kidx][en] = 1'b1;
      mkey = model_next(mkey);
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
