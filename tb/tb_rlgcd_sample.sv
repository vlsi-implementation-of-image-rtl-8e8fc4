// tb_rlgcd_sample: the whole cipher on the published sample pixels.
//
// The top is loaded from a 16-word file holding the first 16 pixels of the
// sample image as binary text (the format of the original flow) and runs
// 40 cycles. The first six cycles must show exactly the key and cipher values
// of the published timing diagram (keys 0001 0011 0111 1110 1101 1011;
// cipher 01111110 01011101 00011100 10001101 01001010 01111011), and in
// every cycle de must equal inn and pixels must follow the file in order,
// wrapping after 16. A watchdog ends the run after 1000 cycles.
module tb_rlgcd_sample;
  import rlgcd_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic       rst;
  pixel_t     inn, en, de;
  key_t       key_en, key_de;
  logic [3:0] pix_addr;

  rlgcd #(.DEPTH(16), .INIT_FILE("tb/sample_pixels.mem"))
        dut (.clk, .rst, .inn, .pix_addr, .key_en, .key_de, .en, .de);

  task automatic check(input logic cond, input string what, input int n);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at cycle %0d: inn=%b key=%b en=%b de=%b", what, n, inn, key_en, en, de);
    end
  endtask

  initial begin
    pixel_t sample [16] = '{8'h6F, 8'h6C, 8'h6A, 8'h63, 8'h9F, 8'hB0, 8'hAD, 8'hB3,
                            8'hB6, 8'hBC, 8'hBA, 8'hB7, 8'hBB, 8'hB3, 8'h76, 8'h74};
    key_t   pub_key [6] = '{4'b0001, 4'b0011, 4'b0111, 4'b1110, 4'b1101, 4'b1011};
    pixel_t pub_en  [6] = '{8'b01111110, 8'b01011101, 8'b00011100,
                            8'b10001101, 8'b01001010, 8'b01111011};
    rst = 1'b1;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int n = 0; n < 40; n++) begin
      check(inn == sample[n % 16], "pixel from file", n);
      check(de == inn, "recovered pixel", n);
      check(key_en == key_de, "keys equal", n);
      if (n < 6) begin
        check(key_en == pub_key[n], "published key", n);
        check(en == pub_en[n], "published cipher", n);
      end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
