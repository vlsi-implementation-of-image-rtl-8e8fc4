// tb_key_xor: exhaustive self-checking test of the key XOR stage.
//
// Every pair of 4-bit data and key values is applied. Each output bit must be
// 1 exactly where data and key bits differ (checked bit by bit), and XORing
// the result with the same key again must give the data back. A watchdog
// ends the run after 1000 clock cycles.
module tb_key_xor;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [3:0] din, key, dout, back;

  key_xor #(.WIDTH(4)) dut  (.din, .key, .dout);
  key_xor #(.WIDTH(4)) dut2 (.din(dout), .key, .dout(back));

  initial begin
    for (int v = 0; v < 256; v++) begin
      logic ok;
      {din, key} = 8'(v);
      #1;
      ok = 1'b1;
      for (int k = 0; k < 4; k++) if (dout[k] != (din[k] != key[k])) ok = 1'b0;
      checks++;
      if (!ok) begin failures++; $display("FAIL din=%b key=%b dout=%b", din, key, dout); end
      checks++;
      if (back != din) begin failures++; $display("FAIL inverse din=%b key=%b", din, key); end
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
