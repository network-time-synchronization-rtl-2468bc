// tb_sntp_system_full: the whole system at its default size (50 MHz system
// clocks, 2^-22 s time resolution, 1 s poll interval), taken through one
// complete synchronisation.
//
// A GPS receiver model sends PPS and an RMC sentence each second at
// 115200 baud. A LAN model passes each station's frames to the other
// (destination MAC or broadcast) after a fixed delay, one byte per cycle,
// and a BOOTP server model answers at once with the serial rate divider
// 50e6/115200 = 434 and p = 0, q = 2. The client's oscillator is 100 ppm
// fast. The client is released from reset 1.02 s after the first GPS second,
// by when the server has stepped to GPS time and confirmed it (locked), so its first NTP exchange steps it to
// the server's time; the run then goes on past the next whole second so the
// client's PPS and RMC outputs can be checked.
//
// Checked: configuration of both stations, ARP resolution, server step and
// lock, client step and its time against true time (within 3 cycles after
// the step); then, as the client gains 100 ppm after the step, that its next
// NTP exchange measures exactly that drift (within 3 cycles) without a
// second step, that its PPS edge and its clock at the end are off by that
// drift, and that its RMC sentence names the new second with status V (not
// yet locked).
module tb_sntp_system_full;
  import sntp_pkg::*;
  import tb_net_pkg::*;

  localparam real   SRV_PER = 20.0;                   // ns, 50 MHz
  localparam real   CLI_PER = 19.998;                 // 100 ppm fast
  localparam int    DIV     = 434;                    // 115200 baud
  localparam real   FIRST   = 1.0e6;                  // first GPS second (ns)
  localparam int unsigned START = 32'hD3B5_3E00;
  localparam bit [47:0] SMAC = 48'h02_00_00_00_00_01, CMAC = 48'h02_00_00_00_00_02;
  localparam bit [47:0] HMAC = 48'h02_AA_BB_CC_DD_EE;
  localparam bit [31:0] SIP = 32'h0A000002, CIP = 32'h0A000014;
  localparam longint CYC = 4194304 / 50_000_000 + 1;  // one cycle in 2^-22 s units (rounded up)

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

  sntp_system dut (.*);

  gps_model #(.SEC_NS(1.0e9), .FIRST_NS(FIRST), .PPS_NS(1.0e8), .DELAY_NS(1.0e6),
              .BIT_NS(DIV * SRV_PER), .START(START)) gps (.pps(gps_pps), .txd(gps_rxd));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #(2.2e9);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic ts_t true_now();
    real s;
    s = ($realtime - FIRST) / 1.0e9;
    return {START, 22'd0} + ts_t'(longint'(s * 4194304.0));
  endfunction
  function automatic longint abs_err(ts_t a, ts_t b);
    ts_t d;
    longint e;
    d = a - b;
    e = longint'(signed'(d));
    return e < 0 ? -e : e;
  endfunction

  // ---------------- LAN ----------------
  bytes_t to_srv[$], to_cli[$];
  int n_arp = 0;

  task automatic route(bytes_t f, bit from_srv);
    bit [47:0] dst = get(f, 0, 6);
    if (get(f, 12, 2) == 16'h0800 && f.size() > 42 && get(f, 36, 2) == 67) begin
      if (from_srv) to_srv.push_back(bootp_reply(48'hFFFF_FFFF_FFFF, HMAC, get(f, 46, 4), SMAC,
                                                 SIP, 32'hFFFFFF00, 32'h0, 0, 2, DIV, 0));
      else          to_cli.push_back(bootp_reply(48'hFFFF_FFFF_FFFF, HMAC, get(f, 46, 4), CMAC,
                                                 CIP, 32'hFFFFFF00, SIP, 0, 2, DIV, 0));
      return;
    end
    if (get(f, 12, 2) == 16'h0806) n_arp++;
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

  initial forever begin
    bytes_t f;
    @(negedge srv_clk);
    if (to_srv.size() > 0) begin
      f = to_srv.pop_front();
      repeat (50) @(negedge srv_clk);
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
      repeat (50) @(negedge cli_clk);
      foreach (f[i]) begin
        cli_rx_data = f[i]; cli_rx_valid = 1; cli_rx_last = (i == f.size() - 1);
        @(negedge cli_clk);
      end
      cli_rx_valid = 0; cli_rx_last = 0;
    end
  end

  // ---------------- observation ----------------
  int n_srv_step = 0, n_cli_step = 0, n_cli_meas = 0, n_pps = 0;
  longint pps_err = -1, step_err = -1, small_off = -1, pps_drift = 0, off_drift = 0;
  real t_step = 0;
  // the client clock gains 100 ppm on true time after its step
  function automatic longint drift();
    return longint'(($realtime - t_step) * 1.0e-13 * 4194304.0);
  endfunction
  logic cli_pps_d = 0;
  always @(posedge srv_clk) if (srv_rst_n && srv_stepped) n_srv_step++;
  always @(posedge cli_clk) if (cli_rst_n) begin
    if (cli_stepped) begin n_cli_step++; t_step = $realtime; end
    if (cli_offset_valid) begin
      n_cli_meas++;
      if (n_cli_step > 0) begin
        small_off = -cli_offset;
        off_drift = drift();
      end
    end
    cli_pps_d <= cli_pps;
    if (cli_pps && !cli_pps_d && n_cli_step > 0) begin
      ts_t t;
      longint e;
      t = true_now();
      e = longint'(signed'(t[21:0]));
      n_pps++;
      pps_err = -e;
      pps_drift = drift();
    end
  end

  string rmc_line = "", last_rmc = "";
  initial begin
    wait (cli_rst_n);
    wait (cli_cfg_done);
    @(posedge cli_pps);      // the first edge after configuration
    forever begin
      byte unsigned c;
      @(negedge cli_txd);
      #(DIV * CLI_PER * 1.5);
      for (int b = 0; b < 8; b++) begin c[b] = cli_txd; #(DIV * CLI_PER); end
      rmc_line = {rmc_line, string'(c)};
      if (c == 8'h0A) begin last_rmc = rmc_line; rmc_line = ""; end
    end
  end

  function automatic string expect_rmc(bit [31:0] sec);
    longint t = longint'(sec) - 64'd2208988800;
    int y, m, d;
    string body, hx;
    byte unsigned cs = 0;
    civil(t / 86400, y, m, d);
    // status V: the client is not locked until its second exchange
    body = $sformatf("GPRMC,%02d%02d%02d.00,V,,,,,,,%02d%02d%02d,,,A",
                     (t % 86400) / 3600, (t % 3600) / 60, t % 60, d, m, y % 100);
    for (int i = 0; i < body.len(); i++) cs ^= body[i];
    hx = $sformatf("%02x", cs);
    return {"$", body, "*", hx.toupper(), "\r\n"};
  endfunction

  initial begin
    longint e_cli;
    repeat (3) @(negedge srv_clk);
    srv_rst_n = 1;
    #(FIRST + 1.02e9 - $realtime);
    check(srv_cfg_done && n_srv_step == 1 && srv_synced, "server configured, stepped to GPS time and locked");
    cli_rst_n = 1;
    wait (n_cli_step > 0);
    repeat (3) @(negedge cli_clk);
    step_err = abs_err(cli_now, true_now());
    $display("client stepped at %0t ns, error %0d (2^-22 s units)", $realtime, step_err);
    check(cli_cfg_done, "client configured");
    check(n_arp >= 2, "client resolved the server by ARP");
    check(step_err <= 3 * CYC, $sformatf("client within 3 cycles of true time after the step (%0d)", step_err));
    #(FIRST + 2.03e9 - $realtime);
    e_cli = abs_err(cli_now, true_now());
    $display("end: client error %0d, last offset %0d, delay %0d, pps error %0d, rmc %s",
             e_cli, cli_offset, cli_delay, pps_err, last_rmc);
    check(n_cli_step == 1 && n_cli_meas >= 2, "second exchange slewed, not stepped");
    check(small_off - off_drift <= 3 * CYC && off_drift - small_off <= 3 * CYC,
          $sformatf("second exchange measures the 100 ppm drift (%0d, expected %0d)", -small_off, -off_drift));
    check(e_cli - drift() <= 3 * CYC && drift() - e_cli <= 3 * CYC,
          $sformatf("client error at the end is the drift (%0d, expected %0d)", e_cli, drift()));
    check(n_pps >= 1 && pps_err - pps_drift <= 3 * CYC && pps_drift - pps_err <= 3 * CYC,
          $sformatf("client PPS early by the drift (%0d, expected %0d)", pps_err, pps_drift));
    check(last_rmc == expect_rmc(START + 2), $sformatf("client RMC for the new second: %s", last_rmc));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
