// tb_rlgcd_watermark: a watermarked 128x128 image through the whole cipher.
//
// This reproduces the intended use of the design: the image is watermarked
// in software before encryption, and the watermark is read back from the
// decrypted image. The testbench embeds the 42-bit watermark "OUTPUT"
// (six 7-bit ASCII characters) into the default synthetic image held by the
// top's ROM. It writes bits 3 and 2 of every fifth pixel: the first eight
// such pixels carry a 16-bit length (most significant pair first), the
// following ones carry the watermark, two bits per pixel. The embedding
// layout is this testbench's reading of the software step; the hardware does
// not depend on it.
//
// Over one full image (16,384 cycles) it checks that de equals inn, then
// extracts length and characters from the collected de pixels and compares
// them with "OUTPUT". It also counts the watermark-carrying pixels whose
// encrypted bits 3:2 differ from the embedded bits (the cipher hides the
// mark), and fails if there are none. A watchdog ends the run after 40000
// cycles.
module tb_rlgcd_watermark;
  import rlgcd_pkg::*;
  localparam int GAP    = 5;
  localparam int LEN_SLOTS = 8;
  localparam int NCHAR  = 6;
  localparam int NBITS  = NCHAR * 7;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic        rst;
  pixel_t      inn, en, de;
  key_t        key_en, key_de;
  logic [13:0] pix_addr;

  rlgcd dut (.clk, .rst, .inn, .pix_addr, .key_en, .key_de, .en, .de);

  logic [6:0] mark [NCHAR] = '{7'b1001111, 7'b1010101, 7'b1010100,
                               7'b1010000, 7'b1010101, 7'b1010100};
  logic [1:0] slot_bits [LEN_SLOTS + (NBITS + 1) / 2];
  pixel_t     got [16384];

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [15:0]    len;
    logic [NBITS-1:0] bits;
    int nslots, hidden;
    logic [15:0]    got_len;
    logic [NBITS-1:0] got_bits;

    // bit stream: length, then characters MSB first
    len = 16'(NBITS);
    for (int c = 0; c < NCHAR; c++) bits[NBITS-1-7*c -: 7] = mark[c];
    for (int s = 0; s < LEN_SLOTS; s++) slot_bits[s] = len[15 - 2*s -: 2];
    nslots = LEN_SLOTS + (NBITS + 1) / 2;
    for (int s = LEN_SLOTS; s < nslots; s++) slot_bits[s] = bits[NBITS-1 - 2*(s-LEN_SLOTS) -: 2];

    rst = 1'b1;
    #1;
    for (int s = 0; s < nslots; s++) dut.u_rom.mem[s * GAP][3:2] = slot_bits[s];
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;

    hidden = 0;
    for (int n = 0; n < 16384; n++) begin
      check(de == inn, "recovered pixel");
      got[n] = de;
      if (n % GAP == 0 && n / GAP < nslots && en[3:2] != slot_bits[n / GAP]) hidden++;
      @(posedge clk); #1;
    end

    for (int s = 0; s < LEN_SLOTS; s++) got_len[15 - 2*s -: 2] = got[s * GAP][3:2];
    check(got_len == 16'(NBITS), "extracted length");
    for (int s = LEN_SLOTS; s < nslots; s++)
      got_bits[NBITS-1 - 2*(s-LEN_SLOTS) -: 2] = got[s * GAP][3:2];
    for (int c = 0; c < NCHAR; c++) begin
      check(got_bits[NBITS-1-7*c -: 7] == mark[c], "extracted character");
      $write("%c", got_bits[NBITS-1-7*c -: 7]);
    end
    $display("");
    $display("watermark pixels whose encrypted bits 3:2 differ from the mark: %0d of %0d", hidden, nslots);
    check(hidden > 0, "cipher hides the watermark");
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
