// tb_decryption: self-checking test of the decryption block.
//
// The testbench encrypts with its own reference model (bit equations of the
// cipher and an arithmetic LFSR model, both independent of the RTL) and
// feeds the result to the decryption block, which must return the original
// pixel. First the six cipher values of the published timing diagram must
// decrypt to the six published pixels; then every (pixel, key) pair is
// covered over 256 x 15 cycles, and the block's key output is compared with
// the model. A watchdog ends the run after 10000 cycles.
module tb_decryption;
  import rlgcd_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic   rst;
  pixel_t en, de, plain;
  key_t   key;

  decryption dut (.clk, .rst, .en, .de, .key);

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
      if (failures < 20) $display("FAIL %s: plain=%b key=%b en=%b de=%b", what, plain, key, en, de);
    end
  endtask

  initial begin
    pixel_t pub_in [6] = '{8'b01101111, 8'b01101100, 8'b01101010,
                           8'b01100011, 8'b10011111, 8'b10110000};
    pixel_t pub_en [6] = '{8'b01111110, 8'b01011101, 8'b00011100,
                           8'b10001101, 8'b01001010, 8'b01111011};
    key_t   mkey;

    rst = 1'b1; en = '0; plain = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int n = 0; n < 6; n++) begin
      plain = pub_in[n];
      en    = pub_en[n];
      #1;
      check(de == plain, "published value decrypts");
      @(posedge clk); #1;
    end

    rst = 1'b1;
    @(posedge clk); #1 rst = 1'b0;
    mkey = 4'b0001;
    for (int n = 0; n < 256 * 15; n++) begin
      plain = pixel_t'(n / 15);
      en    = ref_enc(plain, mkey);
      #1;
      check(key == mkey, "key sequence");
      check(de == plain, "round trip");
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
