// tb_sntp_server: self-checking testbench of the SNTP server station.
//
// The server runs at a reduced clock (CLK_HZ = 200 kHz) with a GPS receiver
// model on its serial input and PPS, and the testbench plays the rest of the
// LAN: it answers the server's BOOTP request (serial rate divider 16, q = 2),
// asks for the server's MAC address by ARP, and sends NTP requests, one
// before the server has GPS time and several after, with random transmit
// timestamps and random gaps.
//
// Checked against values worked out here: the BOOTP request; the ARP reply
// (addresses); that the server steps to GPS time and locks; every NTP
// reply's addresses and ports, mode 4, stratum 1, reference id "GPS",
// originate = the request's transmit timestamp, leap indicator 3 before
// synchronisation and 0 after, and, once locked, receive and transmit
// timestamps within 3 clock cycles of true GPS time at the moments the
// request's first byte arrived and the reply's first byte left.
module tb_sntp_server;
  import sntp_pkg::*;
  import tb_net_pkg::*;

  localparam int    HZ    = 200_000;
  localparam real   PER   = 1.0e9 / HZ;
  localparam int    DIV   = 16;
  localparam real   FIRST = 3.0e5;
  localparam int unsigned START = 32'hD3B5_3E00;
  localparam bit [47:0] SMAC = 48'h02_00_00_00_00_01, HMAC = 48'h02_AA_BB_CC_DD_EE;
  localparam bit [31:0] SIP = 32'h0A000002, HIP = 32'h0A000063;
  localparam longint CYC = 4194304 / HZ + 1;

  logic clk = 0, rst_n = 0;
  always #(PER / 2) clk = ~clk;

  logic [7:0] rx_data = 0, tx_data;
  logic rx_valid = 0, rx_last = 0, tx_valid, tx_last, tx_ready = 1;
  logic gps_rxd, gps_pps;
  ts_t now;
  logic cfg_done, synced, stepped;
  ofs_t last_offset;
  logic [15:0] ntp_served, ntp_dropped, gps_good, gps_bad;

  sntp_server #(.CLK_HZ(HZ), .MAC_ADDR(SMAC)) dut (.*);

  gps_model #(.SEC_NS(1.0e9), .FIRST_NS(FIRST), .PPS_NS(1.0e8), .DELAY_NS(1.0e8),
              .BIT_NS(DIV * PER), .START(START)) gps (.pps(gps_pps), .txd(gps_rxd));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #(6.0e9);
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

  // frames from the server, with the true time their first byte left
  bytes_t cur, got[$];
  ts_t got_t[$], t_first;
  always @(posedge clk) if (rst_n && tx_valid && tx_ready) begin
    if (cur.size() == 0) t_first = true_now();
    cur.push_back(tx_data);
    if (tx_last) begin got.push_back(cur); got_t.push_back(t_first); cur = {}; end
  end

  // send a frame; returns the true time its first byte arrived
  task automatic send(bytes_t f, output ts_t t0);
    @(negedge clk);
    foreach (f[i]) begin
      rx_data = f[i]; rx_valid = 1; rx_last = (i == f.size() - 1);
      if (i == 0) t0 = true_now();
      @(negedge clk);
    end
    rx_valid = 0; rx_last = 0;
  endtask

  task automatic wait_frame(output bytes_t f, output ts_t t);
    int n = 0;
    while (got.size() == 0 && n < 5000) begin @(negedge clk); n++; end
    if (got.size() == 0) begin f = {}; t = '0; end
    else begin f = got.pop_front(); t = got_t.pop_front(); end
  endtask

  task automatic ntp_exchange(bit expect_sync);
    bytes_t f;
    ts_t t2, t3;
    bit [63:0] x;
    longint e2, e3;
    x = {$urandom, $urandom};
    send(ntp(SMAC, HMAC, HIP, SIP, 8'h23, 0, 0, x), t2);
    wait_frame(f, t3);
    check(f.size() == 90, $sformatf("NTP reply length %0d", f.size()));
    if (f.size() != 90) return;
    check(get(f, 0, 6) == HMAC && get(f, 6, 6) == SMAC && get(f, 26, 4) == SIP && get(f, 30, 4) == HIP,
          "NTP reply addresses");
    check(get(f, 34, 2) == 123 && get(f, 36, 2) == 123, "NTP reply ports");
    check(f[42][2:0] == 3'd4 && f[43] == 8'd1 && get(f, 54, 4) == 32'h47505300, "mode 4, stratum 1, refid GPS");
    check(get(f, 66, 8) == x, "originate = request transmit timestamp");
    check(f[42][7:6] == (expect_sync ? 2'b00 : 2'b11), $sformatf("leap indicator %0d", f[42][7:6]));
    if (expect_sync) begin
      e2 = abs_err(ntp_to_ts(get(f, 74, 8)), t2);
      e3 = abs_err(ntp_to_ts(get(f, 82, 8)), t3);
      check(e2 <= 3 * CYC, $sformatf("receive timestamp error %0d", e2));
      check(e3 <= 3 * CYC, $sformatf("transmit timestamp error %0d", e3));
    end
  endtask

  int n_step = 0;
  always @(posedge clk) if (rst_n && stepped) n_step++;

  initial begin
    bytes_t f;
    ts_t t;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // BOOTP
    wait_frame(f, t);
    check(f.size() == 342 && get(f, 0, 6) == 48'hFFFF_FFFF_FFFF && get(f, 6, 6) == SMAC &&
          get(f, 36, 2) == 67 && f[42] == 8'd1 && get(f, 70, 6) == SMAC, "BOOTP request");
    send(bootp_reply(48'hFFFF_FFFF_FFFF, HMAC, get(f, 46, 4), SMAC, SIP, 32'hFFFFFF00, 0, 0, 2, DIV, 0), t);
    repeat (10) @(negedge clk);
    check(cfg_done, "configured");
    // ARP
    send(arp(1, 48'hFFFF_FFFF_FFFF, HMAC, HIP, 0, SIP), t);
    wait_frame(f, t);
    check(f.size() == 60 && get(f, 0, 6) == HMAC && get(f, 12, 2) == 16'h0806 && get(f, 20, 2) == 2 &&
          get(f, 22, 6) == SMAC && get(f, 28, 4) == SIP && get(f, 32, 6) == HMAC && get(f, 38, 4) == HIP,
          "ARP reply");
    // before GPS time: leap indicator 3
    ntp_exchange(0);
    // GPS: step at the first good second, lock at the next
    wait (synced);
    check(n_step == 1 && gps_good >= 2 && gps_bad == 0, "GPS sentences accepted");
    for (int i = 0; i < 12; i++) begin
      repeat ($urandom_range(1, 40000)) @(negedge clk);
      ntp_exchange(1);
    end
    check(abs_err(now, true_now()) <= 3 * CYC, "clock within 3 cycles of GPS time");
    check(n_step == 1, $sformatf("one step (%0d)", n_step));
    check(ntp_served == 13 && ntp_dropped == 0, $sformatf("served %0d dropped %0d", ntp_served, ntp_dropped));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
