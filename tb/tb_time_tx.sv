// tb_time_tx: self-checking testbench of the time transmission module.
// For a series of NTP seconds values (random, leap days, year ends) the testbench sets the local time, pulses sec_tick and collects
// the characters handed to the UART (accepted with a random ready signal).
// The sentence must equal the RMC sentence built here from a closed-form
// civil-from-days conversion, with the checksum computed here, and the
// status letter must follow time_ok. The PPS output must rise one cycle after
// the tick and stay high for PPS_WIDTH cycles. A tick during a sentence must
// give a PPS pulse but no second sentence.
module tb_time_tx;
  import sntp_pkg::*;
  localparam int PW = 50;

  logic clk = 0, rst_n = 0;
  ts_t now = 0;
  logic sec_tick = 0, time_ok = 0, pps_out, tx_valid, tx_ready = 0;
  logic [7:0] tx_data;
  logic [15:0] sent_count;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  time_tx #(.CLK_HZ(1000), .PPS_WIDTH(PW)) dut (
    .clk, .rst_n, .now, .sec_tick, .time_ok, .pps_out, .tx_data, .tx_valid, .tx_ready, .sent_count);

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

  string line = "";
  always @(posedge clk) begin
    if (rst_n && tx_valid && tx_ready) line = {line, string'(tx_data)};
    tx_ready <= ($urandom_range(0, 3) != 0);
  end

  int pps_len = 0;
  always @(posedge clk) if (rst_n && pps_out) pps_len++;

  // civil date from days since 1970-01-01 (closed form)
  function automatic void civil(longint z, output int y, output int m, output int d);
    longint era, doe, yoe, doy, mp;
    z += 719468;
    era = z / 146097;
    doe = z - era * 146097;
    yoe = (doe - doe / 1460 + doe / 36524 - doe / 146096) / 365;
    y = int'(yoe + era * 400);
    doy = doe - (365 * yoe + yoe / 4 - yoe / 100);
    mp = (5 * doy + 2) / 153;
    d = int'(doy - (153 * mp + 2) / 5 + 1);
    m = int'(mp < 10 ? mp + 3 : mp - 9);
    if (m <= 2) y++;
  endfunction

  function automatic string expect_rmc(bit [31:0] sec, bit ok);
    longint t = longint'(sec) - 64'd2208988800;   // 1900..2036 only
    int y, m, d;
    string body, hx;
    byte unsigned cs = 0;
    civil(t / 86400, y, m, d);
    body = $sformatf("GPRMC,%02d%02d%02d.00,%s,,,,,,,%02d%02d%02d,,,A",
                     (t % 86400) / 3600, (t % 3600) / 60, t % 60, ok ? "A" : "V", d, m, y % 100);
    for (int i = 0; i < body.len(); i++) cs ^= body[i];
    hx = $sformatf("%02x", cs);
    return {"$", body, "*", hx.toupper(), "\r\n"};
  endfunction

  task automatic one(bit [31:0] sec, bit ok);
    int c0;
    string exp_s;
    line = "";
    pps_len = 0;
    @(negedge clk);
    now = {sec, 22'd5}; time_ok = ok; sec_tick = 1;
    @(negedge clk);
    sec_tick = 0;
    check(pps_out, "PPS high one cycle after the tick");
    c0 = 0;
    while (line.len() < 40 && c0 < 900) begin @(negedge clk); c0++; end
    repeat (PW) @(negedge clk);
    exp_s = expect_rmc(sec, ok);
    check(line == exp_s, $sformatf("sentence '%s' expected '%s'", line, exp_s));
    check(pps_len == PW, $sformatf("PPS width %0d", pps_len));
    check(c0 < 900, "sentence done within the second");
  endtask

  initial begin
    int n0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    one(32'hD3B5_3E00, 1);                                   // a 2012 date
    one(32'd3534364800 + 59 * 86400 + 86399, 1);           // 2012-02-29 23:59:59
    one(32'd3534364800 - 1, 0);                            // 2011-12-31 23:59:59, status V
    one(32'd3155673600, 1);                                // 2000-01-01 00:00:00
    one(32'd3155673600 + 60 * 86400, 1);                   // 2000-03-01
    for (int i = 0; i < 6; i++) one($urandom_range(32'd3155673600, 32'hFFFF_FFFF), $urandom_range(0, 1));
    // a tick in the middle of a sentence: PPS again, sentence not restarted
    n0 = sent_count;
    @(negedge clk);
    now = {32'd3600000000, 22'd0}; sec_tick = 1;
    @(negedge clk);
    sec_tick = 0;
    repeat (150) @(negedge clk);
    sec_tick = 1;
    @(negedge clk);
    sec_tick = 0;
    check(pps_out, "PPS for a tick during a sentence");
    repeat (1500) @(negedge clk);
    check(sent_count == 16'(n0 + 1), $sformatf("one sentence for two close ticks (%0d)", sent_count - n0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
