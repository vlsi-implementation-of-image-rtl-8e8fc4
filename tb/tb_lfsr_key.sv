// tb_lfsr_key: self-checking test of the 4-bit XNOR key generator.
//
// After reset the key must be the seed 0001 and then follow the sequence of
// the published timing diagram (0011, 0111, 1110, 1101, 1011). Beyond that
// every step is compared with an arithmetic model of the register, the
// period must be exactly 15 (every state but 1111 seen once per period),
// and a reset in the middle of the run must bring the seed back. A watchdog
// ends the run after 2000 clock cycles.
module tb_lfsr_key;
  import rlgcd_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic rst;
  key_t key;

  lfsr_key dut (.clk, .rst, .key);

  function automatic int model_next(int s);
    int fb;
    fb = (((s >> 3) & 1) == ((s >> 2) & 1)) ? 1 : 0;
    return ((s * 2) % 16) + fb;
  endfunction

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s: key=%b", what, key); end
  endtask

  initial begin
    key_t published [6] = '{4'b0001, 4'b0011, 4'b0111, 4'b1110, 4'b1101, 4'b1011};
    int   model;
    int   seen [16];
    rst = 1'b1;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int n = 0; n < 6; n++) begin
      check(key == published[n], "published sequence");
      @(posedge clk); #1;
    end
    // key is now the 7th state; follow two full periods with the model
    model = 4'b0110;
    foreach (seen[i]) seen[i] = 0;
    for (int n = 0; n < 30; n++) begin
      check(int'(key) == model, "model sequence");
      seen[key]++;
      model = model_next(model);
      @(posedge clk); #1;
    end
    for (int s = 0; s < 15; s++) check(seen[s] == 2, "each state twice in 30 steps");
    check(seen[15] == 0, "lock-up state never reached");
    // reset in mid-run
    rst = 1'b1;
    @(posedge clk); #1 rst = 1'b0;
    check(key == 4'b0001, "seed after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
