// tb_uart: self-checking testbench of the UART.
// The transmitter is looped back into the receiver. Random bytes are sent;
// each must come back unchanged, the character must take 10 bit periods on
// the line, and the line levels of the start bit, the data bits and the stop
// bit are sampled in the middle of each bit and compared. A character with a
// low stop bit driven by the testbench must raise rx_frame_err.
module tb_uart;
  localparam int DIV = 12;

  logic clk = 0, rst_n = 0;
  logic [7:0] tx_data, rx_data;
  logic tx_valid, tx_ready, txd, rx_valid, rx_frame_err;
  logic force_low, rxd;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  assign rxd = txd & ~force_low;

  uart dut (.clk, .rst_n, .baud_div(16'(DIV)), .tx_data, .tx_valid, .tx_ready, .txd,
            .rxd, .rx_data, .rx_valid, .rx_frame_err);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  byte unsigned got[$];
  int errs = 0;
  always @(posedge clk) begin
    if (rx_valid && rst_n) got.push_back(rx_data);
    if (rx_frame_err && rst_n) errs++;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte unsigned sent[$];
    tx_valid = 0; tx_data = 0; force_low = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    for (int n = 0; n < 20; n++) begin
      byte unsigned b = byte'($urandom);
      int t0, t1;
      @(negedge clk);
      wait (tx_ready);
      @(negedge clk);
      tx_data = b; tx_valid = 1;
      @(negedge clk);
      tx_valid = 0;
      sent.push_back(b);
      // txd goes low one cycle after the byte is taken; sample mid-bit
      t0 = 0;
      while (txd) begin @(negedge clk); t0++; end
      for (int bit_i = 0; bit_i < 10; bit_i++) begin
        logic exp_lvl;
        repeat (DIV / 2) @(negedge clk);
        exp_lvl = (bit_i == 0) ? 1'b0 : (bit_i == 9) ? 1'b1 : b[bit_i - 1];
        check(txd == exp_lvl, $sformatf("byte %0d bit %0d level", n, bit_i));
        repeat (DIV - DIV / 2) @(negedge clk);
      end
      t1 = 0;
      while (!tx_ready) begin @(negedge clk); t1++; end
      check(t1 <= 2, "transmitter ready right after stop bit");
    end
    repeat (4 * DIV) @(negedge clk);
    check(got.size() == sent.size(), $sformatf("received %0d of %0d", got.size(), sent.size()));
    for (int i = 0; i < sent.size() && i < got.size(); i++)
      check(got[i] == sent[i], $sformatf("byte %0d: %02x vs %02x", i, got[i], sent[i]));
    check(errs == 0, "no framing errors in loopback");
    // framing error: start bit, 8 ones, low stop bit
    wait (tx_ready);
    force_low = 1; repeat (DIV) @(negedge clk);
    force_low = 0; repeat (8 * DIV) @(negedge clk);
    force_low = 1; repeat (DIV) @(negedge clk);
    force_low = 0; repeat (3 * DIV) @(negedge clk);
    check(errs == 1, "framing error detected");
    check(got.size() == sent.size(), "bad character not delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
