// tb_sntp_sync: self-checking testbench of the synchronization module.
// Runs at CLK_HZ = 1000 so that one second is 1000 cycles. Checks:
//  - free running: one sec_tick and one second every 1000 cycles;
//  - eq. (1): offset and delay of random timestamp sets against a reference
//    computed here, delivered 2 cycles after meas_valid;
//  - step: an offset beyond the step limit moves the clock at once;
//  - slew: a small offset is worked off over the poll interval by a higher
//    rate (gain of the clock over one second compared with the expected
//    offset/2^q plus the frequency term), then the rate returns to nominal
//    plus the learned frequency correction; the lock flag follows |offset|.
module tb_sntp_sync;
  import sntp_pkg::*;
  localparam int HZ = 1000;

  logic clk = 0, rst_n = 0;
  logic [3:0] poll_exp = 0, q = 0;
  logic meas_valid = 0;
  ts_t t1 = 0, t2 = 0, t3 = 0, t4 = 0, now;
  logic sec_tick, offset_valid, stepped, locked;
  ofs_t offset, delay;
  logic signed [47:0] freq_corr, slew;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sntp_sync #(.CLK_HZ(HZ)) dut (
    .clk, .rst_n, .poll_exp, .q, .freq_trim(32'sd0), .meas_valid, .t1, .t2, .t3, .t4,
    .now, .sec_tick, .offset_valid, .offset, .delay, .stepped, .locked, .freq_corr, .slew);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint sd(ts_t a, ts_t b);   // signed difference in LSB
    ts_t d = a - b;
    return longint'(signed'(d));
  endfunction

  // one measurement: returns after offset_valid, checks latency and values
  task automatic measure(ts_t a, ts_t b, ts_t c, ts_t d);
    longint exp_off, exp_del;
    int lat;
    @(negedge clk);
    t1 = a; t2 = b; t3 = c; t4 = d; meas_valid = 1;
    @(negedge clk);
    meas_valid = 0;
    lat = 1;
    while (!offset_valid) begin @(negedge clk); lat++; end
    exp_off = (sd(b, a) + sd(c, d)) >>> 1;
    exp_del = sd(d, a) - sd(c, b);
    check(lat == 2, $sformatf("offset latency %0d", lat));
    check(longint'(offset) == exp_off, $sformatf("offset %0d expected %0d", offset, exp_off));
    check(longint'(delay) == exp_del, $sformatf("delay %0d expected %0d", delay, exp_del));
    repeat (2) @(negedge clk);   // correction applied, stepped visible
  endtask

  int ticks = 0;
  always @(posedge clk) if (rst_n && sec_tick) ticks++;

  initial begin
    ts_t a, b;
    longint gain, theta;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // ---- free running ----
    @(negedge clk);
    a = now;
    repeat (5 * HZ) @(negedge clk);
    b = now;
    repeat (3) @(negedge clk);
    check(ticks == 5, $sformatf("5 seconds give %0d ticks", ticks));
    check(sd(b, a) >= (64'd5 << 22) - 4 && sd(b, a) <= (64'd5 << 22) + 4,
          $sformatf("5 s of cycles advance %0d LSB", sd(b, a)));
    // ---- eq. (1) with random timestamps ----
    for (int i = 0; i < 20; i++) begin
      ts_t x = {$urandom, 22'($urandom)};
      ts_t y = x + TS_W'($urandom_range(0, 1 << 24));
      ts_t z = y + TS_W'($urandom_range(0, 1 << 20));
      ts_t w = x + TS_W'($urandom_range(0, 1 << 25));
      measure(x, y, z, w);
    end
    // ---- step: clock 1000 s behind ----
    @(negedge clk);
    a = now;
    measure(a, a + (TS_W'(1000) << 22), a + (TS_W'(1000) << 22), a);
    check(stepped, "large offset steps the clock");
    check(sd(now, a) > (64'd1000 << 22) && sd(now, a) < (64'd1000 << 22) + 10 * (64'd1 << 22) / HZ,
          $sformatf("after the step the clock moved %0d", sd(now, a)));
    check(!locked, "not locked after a step");
    // ---- slew: p = 0, q = 0, clock 1000 LSB behind ----
    poll_exp = 0; q = 0;
    theta = 1000;
    @(negedge clk);
    a = now;
    measure(a, a + TS_W'(theta), a + TS_W'(theta), a);
    a = now;
    repeat (HZ) @(negedge clk);
    b = now;
    gain = sd(b, a) - (64'd1 << 22);
    // slew theta/2^q plus frequency theta/2^(2p+q+2) over one second
    check(gain >= 1200 && gain <= 1300, $sformatf("slew gain over 1 s: %0d", gain));
    check(!stepped && slew == 0, "slew ended after 2^p seconds");
    check(freq_corr > 0, "frequency correction learned");
    a = now;
    repeat (HZ) @(negedge clk);
    gain = sd(now, a) - (64'd1 << 22);
    check(gain >= 240 && gain <= 260, $sformatf("frequency gain over 1 s: %0d", gain));
    // ---- q = 2, p = 1: negative offset, softer ----
    poll_exp = 1; q = 2;
    theta = -2000;
    @(negedge clk);
    a = now;
    measure(a, a + TS_W'(theta), a + TS_W'(theta), a);
    a = now;
    repeat (2 * HZ) @(negedge clk);
    gain = sd(now, a) - (64'd2 << 22);
    // slew -2000/4 = -500 plus freq (250 + -2000/2^6 = 218.75 per s) * 2 s
    check(gain >= -80 && gain <= -50, $sformatf("negative slew gain over 2 s: %0d", gain));
    // ---- lock ----
    @(negedge clk);
    a = now;
    measure(a, a + 20, a + 20, a);
    check(locked, "locked with |offset| <= 10 us");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
