// tb_time_rx: self-checking testbench of the time reception module.
// The local time input is a free-running counter. For each case a PPS pulse
// is given, then an NMEA sentence is fed one character every 4 cycles. A
// valid RMC sentence must yield ref_valid with the NTP seconds computed here
// by a closed-form date formula and the local time latched at the PPS edge
// (after the 2-flip-flop synchroniser), within 300 cycles of the line end
// (the conversion takes one cycle per year since 1900).
// Sentences with a wrong checksum, a 'V' status or another sentence type
// must be rejected, and a sentence more than a second after the PPS must
// not produce a reference.
module tb_time_rx;
  import sntp_pkg::*;
  import tb_net_pkg::*;
  localparam int HZ = 1000;

  logic clk = 0, rst_n = 0;
  ts_t now = 0;
  logic pps = 0;
  logic [7:0] rx_data = 0;
  logic rx_valid = 0;
  logic ref_valid;
  ts_t ref_time, pps_local;
  logic [15:0] good_count, bad_count;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  always @(posedge clk) now <= now + 1;

  time_rx #(.CLK_HZ(HZ)) dut (.clk, .rst_n, .now, .pps_in(pps), .rx_data, .rx_valid,
                              .ref_valid, .ref_time, .pps_local, .good_count, .bad_count);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int refs = 0;
  ts_t last_ref;
  always @(posedge clk) if (rst_n && ref_valid) begin refs++; last_ref = ref_time; end

  ts_t pps_now;
  task automatic give_pps();
    @(negedge clk);
    pps = 1; pps_now = now;
    repeat (5) @(negedge clk);
    pps = 0;
  endtask

  task automatic send(string s);
    for (int i = 0; i < s.len(); i++) begin
      @(negedge clk);
      rx_data = s[i]; rx_valid = 1;
      @(negedge clk);
      rx_valid = 0;
      repeat (2) @(negedge clk);
    end
  endtask

  // valid case: expect a reference
  task automatic good(int y, int mo, int d, int h, int mi, int s, string lead = "GP");
    int r0 = refs, waitc = 0;
    give_pps();
    send(rmc(h, mi, s, d, mo, y, "A", 0, lead));
    while (refs == r0 && waitc < 300) begin @(negedge clk); waitc++; end
    check(refs == r0 + 1, $sformatf("%0d-%0d-%0d %0d:%0d:%0d gives a reference", y, mo, d, h, mi, s));
    check(last_ref == {ntp_seconds(y, mo, d, h, mi, s), 22'b0},
          $sformatf("NTP seconds %0d expected %0d", last_ref >> 22, ntp_seconds(y, mo, d, h, mi, s)));
    // the time input counts 1 per cycle here, so the 2-cycle compensation
    // (2 * 2^22 / 1000 = 8388 units) is far larger than a cycle
    check(pps_local + 8388 >= pps_now + 1 && pps_local + 8388 <= pps_now + 4,
          $sformatf("PPS latched at %0d, edge at %0d", pps_local, pps_now));
  endtask

  task automatic bad(string s, bit counts_bad, string what);
    int r0 = refs;
    int b0 = bad_count;
    give_pps();
    send(s);
    repeat (300) @(negedge clk);
    check(refs == r0, {what, ": no reference"});
    if (counts_bad) check(bad_count == 16'(b0 + 1), {what, ": counted as bad"});
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    good(2012, 2, 29, 12, 34, 56);
    good(2011, 3, 14, 0, 0, 0);
    good(2024, 12, 31, 23, 59, 59);
    good(2036, 2, 7, 6, 28, 16);          // NTP seconds wrap to 0
    good(2000, 1, 1, 0, 0, 0, "GN");
    for (int i = 0; i < 5; i++)
      good(2000 + $urandom_range(0, 99), $urandom_range(1, 12), $urandom_range(1, 28),
           $urandom_range(0, 23), $urandom_range(0, 59), $urandom_range(0, 59));
    bad(rmc(10, 0, 0, 1, 6, 2013, "A", 1), 1, "wrong checksum");
    bad(rmc(10, 0, 0, 1, 6, 2013, "V"), 1, "status V");
    bad("$GPGGA,100000.00,3723.2475,N,00559.3720,W,1,08,0.9,545.4,M,46.9,M,,*4A\r\n", 0, "GGA sentence");
    // stale PPS: sentence more than one second after the pulse
    begin
      int r0, g0;
      r0 = refs;
      g0 = good_count;
      give_pps();
      repeat (HZ + 10) @(negedge clk);
      send(rmc(1, 2, 3, 4, 5, 2015, "A"));
      repeat (300) @(negedge clk);
      check(good_count == 16'(g0 + 1), "stale sentence still parsed");
      check(refs == r0, "stale PPS gives no reference");
    end
    good(2015, 5, 4, 1, 2, 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
