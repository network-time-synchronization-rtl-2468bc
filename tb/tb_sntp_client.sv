// tb_sntp_client: self-checking testbench of the SNTP client station.
//
// The client runs at a reduced clock (CLK_HZ = 200 kHz) from an oscillator
// 100 ppm slow. The testbench plays its LAN: a BOOTP server (NTP server
// address, p = 0, q = 2, serial rate divider 16), and an NTP server at that
// address that answers ARP and NTP requests with true time, stamping the
// receive time when a request's first byte is seen and the transmit time
// when the reply's first byte is driven, after a random turnaround. A
// decoder reads the client's serial output.
//
// Checked against values worked out here: the BOOTP, ARP and NTP request
// formats (addresses, ports, mode 3, version 4); that a reply whose
// originate timestamp does not match the request, and a reply with leap
// indicator 3, are ignored (no measurement); that the first good exchange
// steps the clock and the following ones slew it and learn the frequency
// error (+100 ppm of the nominal increment, to within 10 %); that the
// clock locks and ends within 3 cycles of true time; that each measured
// delay is the true round trip less the server's turnaround; that PPS
// edges fall on true seconds; and that each RMC sentence after the step
// is the one for the client's current second, while those sent before
// the step carry status V.
module tb_sntp_client;
  import sntp_pkg::*;
  import tb_net_pkg::*;

  localparam int    HZ    = 200_000;
  localparam real   PER   = 1.0e9 / HZ * (1.0 + 100e-6);   // 100 ppm slow
  localparam int    DIV   = 16;
  localparam int unsigned START = 32'hD3B5_3E00;
  localparam bit [47:0] CMAC = 48'h02_00_00_00_00_02, SMAC = 48'h02_00_00_00_00_01;
  localparam bit [47:0] BMAC = 48'h02_AA_BB_CC_DD_EE;
  localparam bit [31:0] SIP = 32'h0A000002, CIP = 32'h0A000014;
  localparam longint CYC = 4194304 / HZ + 1;

  logic clk = 0, rst_n = 0;
  always #(PER / 2) clk = ~clk;

  logic [7:0] rx_data = 0, tx_data;
  logic rx_valid = 0, rx_last = 0, tx_valid, tx_last, tx_ready = 1;
  logic txd, pps_out;
  ts_t now;
  logic cfg_done, locked, offset_valid, stepped;
  ofs_t last_offset, last_delay;
  logic signed [47:0] freq_corr;
  logic [15:0] ntp_requests, ntp_replies, rmc_sent;

  sntp_client #(.CLK_HZ(HZ), .MAC_ADDR(CMAC)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #(40.0e9);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic ts_t true_now();
    real s;
    s = $realtime / 1.0e9;
    return {START, 22'd0} + ts_t'(longint'(s * 4194304.0));
  endfunction
  function automatic longint sgn_err(ts_t a, ts_t b);
    ts_t d;
    d = a - b;
    return longint'(signed'(d));
  endfunction

  // frames from the client, with the true time their first byte left
  bytes_t cur, got[$];
  ts_t got_t[$], t_first;
  always @(posedge clk) if (rst_n && tx_valid && tx_ready) begin
    if (cur.size() == 0) t_first = true_now();
    cur.push_back(tx_data);
    if (tx_last) begin got.push_back(cur); got_t.push_back(t_first); cur = {}; end
  end

  task automatic send(bytes_t f, output ts_t t0);
    @(negedge clk);
    foreach (f[i]) begin
      rx_data = f[i]; rx_valid = 1; rx_last = (i == f.size() - 1);
      if (i == 0) t0 = true_now();
      @(negedge clk);
    end
    rx_valid = 0; rx_last = 0;
  endtask

  // ---------------- observation ----------------
  int n_step = 0, n_meas = 0, n_pps = 0, n_delay_bad = 0;
  longint max_pps = 0, exp_delay = 0;
  logic pps_d = 0;
  always @(posedge clk) if (rst_n) begin
    if (stepped) n_step++;
    if (offset_valid) begin
      n_meas++;
      if (last_delay - exp_delay > 2 * CYC || exp_delay - last_delay > 2 * CYC) begin
        n_delay_bad++;
        $display("delay %0d expected %0d", last_delay, exp_delay);
      end
    end
    pps_d <= pps_out;
    if (pps_out && !pps_d && locked) begin
      ts_t t;
      longint e;
      t = true_now();
      e = longint'(signed'(t[21:0]));
      n_pps++;
      if ((e < 0 ? -e : e) > max_pps) max_pps = e < 0 ? -e : e;
    end
  end

  string line = "";
  int n_rmc_ok = 0, n_rmc_bad = 0, n_rmc_v = 0, steps_at_start = 0;
  initial begin
    wait (rst_n);
    wait (cfg_done);
    #(0.1e9);                // let a sentence at the old bit rate finish
    forever begin
      byte unsigned c;
      @(negedge txd);
      #(DIV * PER * 1.5);
      for (int b = 0; b < 8; b++) begin c[b] = txd; #(DIV * PER); end
      if (c == "$") begin line = ""; steps_at_start = n_step; end   // resynchronise on each start
      if (line.len() == 17 && steps_at_start == 0 && c == "V") n_rmc_v++;
      line = {line, string'(c)};
      if (c == 8'h0A) begin
        if (steps_at_start > 0) begin
          if (line == expect_rmc(now[53:22], locked) || line == expect_rmc(now[53:22], !locked)) n_rmc_ok++;
          else begin n_rmc_bad++; $display("RMC %s", line); end
        end
        line = "";
      end
    end
  end

  function automatic string expect_rmc(bit [31:0] sec, bit ok);
    longint t;
    int y, m, d;
    string body, hx;
    byte unsigned cs = 0;
    t = longint'(sec) - 64'd2208988800;
    civil(t / 86400, y, m, d);
    body = $sformatf("GPRMC,%02d%02d%02d.00,%s,,,,,,,%02d%02d%02d,,,A",
                     (t % 86400) / 3600, (t % 3600) / 60, t % 60, ok ? "A" : "V", d, m, y % 100);
    for (int i = 0; i < body.len(); i++) cs ^= body[i];
    hx = $sformatf("%02x", cs);
    return {"$", body, "*", hx.toupper(), "\r\n"};
  endfunction

  task automatic wait_frame(output bytes_t f, output ts_t t);
    int n = 0;
    while (got.size() == 0 && n < 300000) begin @(negedge clk); n++; end
    if (got.size() == 0) begin f = {}; t = '0; end
    else begin f = got.pop_front(); t = got_t.pop_front(); end
  endtask

  initial begin
    bytes_t f;
    ts_t t, t2, t3;
    bit [63:0] org;
    int m0, turn;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // BOOTP
    wait_frame(f, t);
    check(f.size() == 342 && get(f, 0, 6) == 48'hFFFF_FFFF_FFFF && get(f, 6, 6) == CMAC &&
          get(f, 34, 2) == 68 && get(f, 36, 2) == 67 && f[42] == 8'd1 && get(f, 70, 6) == CMAC, "BOOTP request");
    send(bootp_reply(48'hFFFF_FFFF_FFFF, BMAC, get(f, 46, 4), CMAC, CIP, 32'hFFFFFF00, SIP, 0, 2, DIV, 0), t);
    // ARP for the server
    wait_frame(f, t);
    check(f.size() == 60 && get(f, 0, 6) == 48'hFFFF_FFFF_FFFF && get(f, 12, 2) == 16'h0806 &&
          get(f, 20, 2) == 1 && get(f, 22, 6) == CMAC && get(f, 28, 4) == CIP && get(f, 38, 4) == SIP,
          "ARP request for the server");
    send(arp(2, CMAC, SMAC, SIP, CMAC, CIP), t);
    // NTP exchanges
    for (int k = 0; k < 34; k++) begin
      wait_frame(f, t2);
      check(f.size() == 90 && get(f, 0, 6) == SMAC && get(f, 26, 4) == CIP && get(f, 30, 4) == SIP &&
            get(f, 34, 2) == 123 && get(f, 36, 2) == 123 && f[42][5:0] == 6'h23, $sformatf("NTP request %0d", k));
      org = get(f, 82, 8);
      m0 = n_meas;
      turn = $urandom_range(5, 60);
      repeat (turn) @(negedge clk);
      if (k == 0) begin
        // leap indicator 3: the server is not synchronised
        send(ntp(CMAC, SMAC, SIP, CIP, 8'hE4, org, ts_to_ntp(t2), ts_to_ntp(true_now())), t);
        repeat (10) @(negedge clk);
        check(n_meas == m0, "reply with leap indicator 3 ignored");
      end else if (k == 1) begin
        // stale reply: originate does not match
        send(ntp(CMAC, SMAC, SIP, CIP, 8'h24, org ^ 64'h400, ts_to_ntp(t2), ts_to_ntp(true_now())), t);
        repeat (10) @(negedge clk);
        check(n_meas == m0, "reply with wrong originate ignored");
      end else begin
        bytes_t r;
        t3 = true_now();
        // t2 is when the request's first byte left the client and the reply's
        // first byte reaches it on the next clock edge. The client takes its
        // transmit timestamp two cycles before its first byte leaves, so the
        // round trip less the turnaround is about 2.5 cycles.
        exp_delay = 5 * CYC / 2;
        r = ntp(CMAC, SMAC, SIP, CIP, 8'h24, org, ts_to_ntp(t2), ts_to_ntp(t3));
        send(r, t);
        repeat (10) @(negedge clk);
        check(n_meas == m0 + 1, "good reply measured");
        if (k == 2) check(n_step == 1, "first good exchange steps the clock");
      end
    end
    check(n_step == 1, $sformatf("no further steps (%0d)", n_step));
    check(locked, "locked");
    check(sgn_err(now, true_now()) <= 3 * CYC && sgn_err(true_now(), now) <= 3 * CYC,
          $sformatf("clock within 3 cycles of true time (%0d)", sgn_err(now, true_now())));
    // 100 ppm of the nominal increment 2^54/HZ
    check(freq_corr > 0 && (freq_corr - 9007199) < 900720 && (9007199 - freq_corr) < 900720,
          $sformatf("frequency correction %0d for 100 ppm", freq_corr));
    check(n_pps >= 5 && max_pps <= 3 * CYC, $sformatf("PPS on true seconds (%0d edges, max error %0d)", n_pps, max_pps));
    check(n_rmc_ok >= 8 && n_rmc_bad == 0, $sformatf("RMC sentences %0d good %0d bad", n_rmc_ok, n_rmc_bad));
    check(n_delay_bad == 0, "measured delays");
    check(n_rmc_v >= 1, "status V in the sentences sent before the clock was set");
    check(ntp_replies == 32, $sformatf("replies counted %0d", ntp_replies));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
