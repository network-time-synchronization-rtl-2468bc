// tb_sntp_system: end-to-end testbench of the whole system.
//
// A GPS receiver model drives the server's serial input and PPS. A LAN model
// connects the two stations' MAC frame streams: every frame a station sends
// is delivered, after the same store-and-forward delay in both directions,
// to the other station if addressed to it or broadcast; BOOTP requests are
// answered by a BOOTP server model (which ignores each station's first
// request, to make the retry happen). The client's oscillator runs 50 ppm
// slow relative to the server's, which runs at the nominal rate. A load
// host injects bursts of NTP requests into the server, one burst while the
// server's transmitter is stalled, and counts the replies.
//
// The system runs at a reduced clock rate (CLK_HZ = 200 kHz, i.e. one clock
// cycle is 5 us) for SIM_S simulated seconds. Checked: both stations are
// configured and the client resolves the server by ARP; the server steps to
// GPS time and locks; the client ignores the unsynchronised server's early
// replies, steps, then slews, learns the 50 ppm frequency error and locks;
// at the end both clocks are within a few clock cycles of true GPS time and
// the client's PPS edges are too; the client's RMC sentences decode to the
// client's second; load requests are answered and one is dropped while the
// server's transmitter is stalled. Every mechanism is counted and one that
// never happened counts as a failure.
module tb_sntp_system;
  import sntp_pkg::*;
  import tb_net_pkg::*;

  localparam int    HZ      = 200_000;
  localparam real   SRV_PER = 1.0e9 / HZ;             // ns
  localparam real   CLI_PER = SRV_PER * (1.0 + 50e-6); // 50 ppm slow
  localparam int    DIV     = 16;                     // UART bit period in cycles
  localparam int    SIM_S   = 40;
  localparam real   FIRST   = 3.0e5;                  // first GPS second starts here (ns)
  localparam int unsigned START = 32'hD3B5_3E00;
  localparam bit [47:0] SMAC = 48'h02_00_00_00_00_01, CMAC = 48'h02_00_00_00_00_02;
  localparam bit [47:0] HMAC = 48'h02_AA_BB_CC_DD_EE;
  localparam bit [31:0] SIP = 32'h0A000002, CIP = 32'h0A000014, HIP = 32'h0A000063;

  logic srv_clk = 0, cli_clk = 0, srv_rst_n = 0, cli_rst_n = 0;
  always #(SRV_PER / 2) srv_clk = ~srv_clk;
  always #(CLI_PER / 2) cli_clk = ~cli_clk;

  logic [7:0] srv_rx_data = 0, cli_rx_data = 0, srv_tx_data, cli_tx_data;
  logic srv_rx_valid = 0, srv_rx_last = 0, cli_rx_valid = 0, cli_rx_last = 0;
  logic srv_tx_valid, srv_tx_last, cli_tx_valid, cli_tx_last;
  logic srv_tx_ready = 1, cli_tx_ready = 1;
  logic gps_rxd, gps_pps;
  ts_t srv_now, cli_now;
  logic srv_cfg_done, srv_synced, srv_stepped, cli_cfg_done, cli_locked, cli_offset_valid, cli_stepped;
  logic cli_txd, cli_pps;
  ofs_t srv_offset, cli_offset, cli_delay;
  logic signed [47:0] cli_freq_corr;
  logic [15:0] srv_ntp_served, srv_ntp_dropped, srv_gps_good, srv_gps_bad;
  logic [15:0] cli_ntp_requests, cli_ntp_replies, cli_rmc_sent;

  sntp_system #(.CLK_HZ(HZ), .SRV_MAC(SMAC), .CLI_MAC(CMAC)) dut (.*);

  gps_model #(.SEC_NS(1.0e9), .FIRST_NS(FIRST), .PPS_NS(1.0e8), .DELAY_NS(1.0e8),
              .BIT_NS(DIV * SRV_PER), .START(START)) gps (.pps(gps_pps), .txd(gps_rxd));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #((SIM_S + 5) * 1.0e9);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // true GPS time in 2^-22 s units
  function automatic ts_t true_now();
    real s;
    s = ($realtime - FIRST) / 1.0e9;
    return {START, 22'd0} + ts_t'(longint'(s * 4194304.0));
  endfunction
  function automatic longint err(ts_t a, ts_t b);
    ts_t d;
    d = a - b;
    return longint'(signed'(d));
  endfunction

  // ---------------- LAN ----------------
  bytes_t to_srv[$], to_cli[$];
  int n_bootp[2] = '{0, 0}, n_arp_req = 0, n_arp_rep = 0, n_li3 = 0, n_load_served = 0;

  task automatic route(bytes_t f, bit from_srv);
    bit [47:0] dst = get(f, 0, 6);
    if (get(f, 12, 2) == 16'h0800 && f.size() > 42 && get(f, 36, 2) == 67) begin
      int k = from_srv ? 0 : 1;
      n_bootp[k]++;
      if (n_bootp[k] >= 2)   // the first request of each station goes unanswered
        if (from_srv) to_srv.push_back(bootp_reply(48'hFFFF_FFFF_FFFF, HMAC, get(f, 46, 4), SMAC,
                                                   SIP, 32'hFFFFFF00, 32'h0, 0, 2, DIV, 0));
        else          to_cli.push_back(bootp_reply(48'hFFFF_FFFF_FFFF, HMAC, get(f, 46, 4), CMAC,
                                                   CIP, 32'hFFFFFF00, SIP, 0, 2, DIV, 0));
      return;
    end
    if (get(f, 12, 2) == 16'h0806) begin
      if (get(f, 20, 2) == 1) n_arp_req++; else n_arp_rep++;
    end
    if (from_srv && get(f, 12, 2) == 16'h0800 && get(f, 36, 2) == 123 && f[42][7:6] == 2'b11 && dst == CMAC)
      n_li3++;
    if (dst == HMAC) begin n_load_served++; return; end
    if (from_srv && (dst == CMAC || dst == 48'hFFFF_FFFF_FFFF)) to_cli.push_back(f);
    if (!from_srv && (dst == SMAC || dst == 48'hFFFF_FFFF_FFFF)) to_srv.push_back(f);
  endtask

  bytes_t scur, ccur;
  always @(posedge srv_clk) if (srv_rst_n && srv_tx_valid && srv_tx_ready) begin
    scur.push_back(srv_tx_data);
    if (srv_tx_last) begin route(scur, 1); scur = {}; end
  end
  always @(posedge cli_clk) if (cli_rst_n && cli_tx_valid && cli_tx_ready) begin
    ccur.push_back(cli_tx_data);
    if (cli_tx_last) begin route(ccur, 0); ccur = {}; end
  end

  // drivers: fixed delay, then one byte per cycle
  initial forever begin
    bytes_t f;
    @(negedge srv_clk);
    if (to_srv.size() > 0) begin
      f = to_srv.pop_front();
      repeat (20) @(negedge srv_clk);
      foreach (f[i]) begin
        srv_rx_data = f[i]; srv_rx_valid = 1; srv_rx_last = (i == f.size() - 1);
        @(negedge srv_clk);
      end
      srv_rx_valid = 0; srv_rx_last = 0;
    end
  end
  initial forever begin
    bytes_t f;
    @(negedge cli_clk);
    if (to_cli.size() > 0) begin
      f = to_cli.pop_front();
      repeat (20) @(negedge cli_clk);
      foreach (f[i]) begin
        cli_rx_data = f[i]; cli_rx_valid = 1; cli_rx_last = (i == f.size() - 1);
        @(negedge cli_clk);
      end
      cli_rx_valid = 0; cli_rx_last = 0;
    end
  end

  // ---------------- observation ----------------
  int n_srv_step = 0, n_srv_lock = 0, n_cli_step = 0, n_cli_slew = 0, n_cli_lock = 0;
  longint max_pps_err = 0;
  int n_pps = 0, n_pps_checked = 0;
  logic cli_pps_d = 0;
  always @(posedge srv_clk) if (srv_rst_n) begin
    if (srv_stepped) n_srv_step++;
    if (srv_synced) n_srv_lock++;
  end
  always @(posedge cli_clk) if (cli_rst_n) begin
    if (cli_stepped) n_cli_step++;
    if (cli_offset_valid && cli_offset < 536871 && cli_offset > -536871) n_cli_slew++;
    if (cli_locked) n_cli_lock++;
    cli_pps_d <= cli_pps;
    if (cli_pps && !cli_pps_d) begin
      n_pps++;
      if (cli_locked) begin
        // the rising edge should be at a whole second of true time
        ts_t t;
        longint e;
        t = true_now();
        e = longint'(signed'(t[21:0]));
        n_pps_checked++;
        if ((e < 0 ? -e : e) > max_pps_err) max_pps_err = (e < 0 ? -e : e);
      end
    end
  end

  // RMC decoder on the client's serial output
  string rmc_line = "";
  int n_rmc_ok = 0, n_rmc_bad = 0, n_rmc_early = 0, steps_at_start = 0;
  initial begin
    // the serial rate is set by BOOTP: start between two sentences after that
    wait (cli_rst_n);
    wait (cli_cfg_done);
    @(posedge cli_pps);
    #(0.5e9);
    forever begin
    byte unsigned c;
    @(negedge cli_txd);
    #(DIV * CLI_PER * 1.5);
    for (int b = 0; b < 8; b++) begin c[b] = cli_txd; #(DIV * CLI_PER); end
    if (rmc_line.len() == 0) steps_at_start = n_cli_step;
    rmc_line = {rmc_line, string'(c)};
    if (c == 8'h0A) begin
      // compare with the sentence for the client's current second (the
      // sentence is sent during the second it describes)
      string exp_a, exp_v;
      exp_a = expect_cli(cli_now[53:22], 1);
      exp_v = expect_cli(cli_now[53:22], 0);
      if (steps_at_start == 0) begin
        // before the first step the clock runs from zero (1900-01-01)
        if (rmc_line.len() == 40 && rmc_line.substr(16, 18) == ",V,") n_rmc_early++;
        else begin n_rmc_bad++; $display("early RMC bad: %s", rmc_line); end
      end else if (rmc_line == exp_a || rmc_line == exp_v) n_rmc_ok++;
      else begin
        n_rmc_bad++;
        $display("RMC mismatch: %s vs %s", rmc_line, exp_a);
      end
      rmc_line = "";
    end
    end
  end

  function automatic string expect_cli(bit [31:0] sec, bit ok);
    longint t = longint'(sec) - 64'd2208988800;
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

  // load host: bursts of NTP requests to the server
  task automatic load_burst(int n);
    for (int i = 0; i < n; i++)
      to_srv.push_back(ntp(SMAC, HMAC, HIP, SIP, 8'h23, 0, 0, 64'(i)));
  endtask

  initial begin
    longint e_srv, e_cli;
    int served0;
    repeat (3) @(negedge srv_clk);
    srv_rst_n = 1;
    #(0.37e6);
    cli_rst_n = 1;
    // let the system come up and synchronise
    #(12.3e9 - $realtime);
    served0 = n_load_served;
    load_burst(20);
    #(0.4e9);
    check(n_load_served == served0 + 20, $sformatf("20 load requests answered (%0d)", n_load_served - served0));
    // stall the server's transmitter while a burst arrives
    @(negedge srv_clk);
    srv_tx_ready = 0;
    load_burst(3);
    #(0.1e9);
    @(negedge srv_clk);
    srv_tx_ready = 1;
    #(SIM_S * 1.0e9 - $realtime);
    // ---------------- final checks ----------------
    e_srv = err(srv_now, true_now());
    e_cli = err(cli_now, true_now());
    $display("server error %0d, client error %0d (units of 2^-22 s = 238 ns; one cycle = %0d)",
             e_srv, e_cli, 4194304 / HZ);
    $display("client: offset %0d delay %0d freq_corr %0d requests %0d replies %0d rmc %0d",
             cli_offset, cli_delay, cli_freq_corr, cli_ntp_requests, cli_ntp_replies, cli_rmc_sent);
    $display("mechanisms: bootp %0d/%0d arp %0d/%0d li3 %0d srv_step %0d srv_lock %0d cli_step %0d cli_slew %0d cli_lock %0d pps %0d/%0d rmc %0d/%0d/%0d load %0d drop %0d",
             n_bootp[0], n_bootp[1], n_arp_req, n_arp_rep, n_li3, n_srv_step, n_srv_lock, n_cli_step,
             n_cli_slew, n_cli_lock, n_pps_checked, n_pps, n_rmc_early, n_rmc_ok, n_rmc_bad, n_load_served, srv_ntp_dropped);
    check(srv_cfg_done && cli_cfg_done, "both stations configured by BOOTP");
    check(n_bootp[0] >= 2 && n_bootp[1] >= 2, "BOOTP retry happened");
    check(n_arp_req >= 1 && n_arp_rep >= 1, "client resolved the server by ARP");
    check(n_li3 >= 1, "unsynchronised server replies seen");
    check(n_srv_step >= 1, "server stepped to GPS time");
    check(n_srv_lock > 0 && srv_synced, "server locked to GPS");
    check(srv_gps_good >= 10 && srv_gps_bad == 0, $sformatf("GPS sentences %0d good %0d bad", srv_gps_good, srv_gps_bad));
    check(n_cli_step >= 1, "client stepped");
    check(n_cli_slew >= 3, "client slewed");
    check(n_cli_lock > 0 && cli_locked, "client locked");
    // a 50 ppm slow oscillator needs 50e-6 of the nominal increment 2^54/HZ added
    check(cli_freq_corr > 0 && (cli_freq_corr - 4503600) < 450360 && (4503600 - cli_freq_corr) < 450360,
          $sformatf("client learned its oscillator is 50 ppm slow (correction %0d)", cli_freq_corr));
    check((e_srv < 0 ? -e_srv : e_srv) <= 3 * 4194304 / HZ, "server within 3 cycles of GPS time");
    check((e_cli < 0 ? -e_cli : e_cli) <= 6 * 4194304 / HZ, "client within 6 cycles of GPS time");
    check(n_pps_checked >= 3 && max_pps_err <= 6 * 4194304 / HZ,
          $sformatf("client PPS edges on true seconds (max error %0d)", max_pps_err));
    check(n_rmc_ok >= 10 && n_rmc_bad == 0, "client RMC sentences match its clock");
    check(n_rmc_early >= 1, "status V sentences before the client had time");
    check(srv_ntp_dropped >= 1, "server dropped a request while its transmitter stalled");
    check(cli_ntp_replies >= 5, "client measurements");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
