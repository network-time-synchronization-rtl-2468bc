// tb_proto_if: self-checking testbench of the protocol and configuration
// interface, with one client instance (k = 0) and one server instance (k = 1)
// at CLK_HZ = 1000 (one second = 1000 cycles). The local time input advances
// by a known step every cycle, so the timestamps the block puts into frames
// can be predicted from the cycle at which a frame starts.
// Client: BOOTP request format and retry after RETRY_S seconds; a reply
// with a wrong transaction id is ignored, the right one configures every
// field; ARP request for the NTP server; NTP request format with T1; a reply
// becomes a measurement with the right t1..t4; a reply with a stale
// originate timestamp is dropped; the poll interval is 2^p seconds; ARP
// requests for the client's address are answered.
// Server: BOOTP; NTP replies carry the request's transmit timestamp as
// originate, the request's arrival time as receive time, the reply's start
// time as transmit time, LI = 3 until synchronised, stratum 1 and id "GPS";
// with the transmitter stalled one request waits and a third is dropped;
// requests for another address are ignored. IPv4 header checksums of all
// frames are verified.
module tb_proto_if;
  import sntp_pkg::*;
  import tb_net_pkg::*;
  localparam int HZ = 1000;
  localparam ts_t STEP = 4194;                 // about 1 ms per cycle
  localparam bit [47:0] CMAC = 48'h02_00_00_00_00_02, SMAC = 48'h02_00_00_00_00_01;
  localparam bit [47:0] HMAC = 48'h02_AA_BB_CC_DD_EE;   // a host on the LAN
  localparam bit [31:0] CIP = 32'h0A000014, SIP = 32'h0A000002, HIP = 32'h0A000063;

  logic clk = 0, rst_n = 0;
  ts_t now = {32'hD000_0000, 22'd0};
  int cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) begin now <= now + STEP; cyc <= cyc + 1; end

  logic [7:0] rx_data[2];
  logic rx_valid[2], rx_last[2];
  logic [7:0] tx_data[2];
  logic tx_valid[2], tx_last[2], tx_ready[2];
  cfg_t cfg[2];
  logic cfg_done[2], meas_valid[2];
  ts_t t1[2], t2[2], t3[2], t4[2];
  logic [15:0] ntp_sent[2], ntp_received[2], ntp_dropped[2], arp_replies[2], bootp_requests[2];
  logic synced = 0;
  ts_t ref_ts = {32'hCFFF_FFF0, 22'h12345};
  bit stall[2] = '{0, 0};

  for (genvar k = 0; k < 2; k++) begin : g_dut
    proto_if #(.IS_SERVER(k == 1), .MAC_ADDR(k == 1 ? SMAC : CMAC), .CLK_HZ(HZ), .RETRY_S(2)) dut (
      .clk, .rst_n, .now,
      .rx_data(rx_data[k]), .rx_valid(rx_valid[k]), .rx_last(rx_last[k]),
      .tx_data(tx_data[k]), .tx_valid(tx_valid[k]), .tx_last(tx_last[k]), .tx_ready(tx_ready[k]),
      .cfg(cfg[k]), .cfg_done(cfg_done[k]), .synced, .ref_ts,
      .meas_valid(meas_valid[k]), .t1(t1[k]), .t2(t2[k]), .t3(t3[k]), .t4(t4[k]),
      .ntp_sent(ntp_sent[k]), .ntp_received(ntp_received[k]), .ntp_dropped(ntp_dropped[k]),
      .arp_replies(arp_replies[k]), .bootp_requests(bootp_requests[k]));
  end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- transmit side: collect frames, note the time of the first byte ----
  bytes_t cur[2], frames[2][$];
  ts_t    start_now[2][$];
  int     start_cyc[2][$];
  bit     in_frame[2] = '{0, 0};
  for (genvar k = 0; k < 2; k++) begin : g_col
    always @(posedge clk) begin
      tx_ready[k] <= !stall[k] && ($urandom_range(0, 4) != 0);
      if (rst_n && tx_valid[k] && tx_ready[k]) begin
        cur[k].push_back(tx_data[k]);
        if (tx_last[k]) begin
          frames[k].push_back(cur[k]);
          cur[k] = {};
        end
      end
    end
    // the builder latches the time in the cycle its start pulse is seen,
    // one cycle before tx_valid rises
    always @(posedge clk) begin
      if (rst_n && tx_valid[k] && !in_frame[k]) begin
        start_now[k].push_back(now - STEP);
        start_cyc[k].push_back(cyc);
      end
      if (rst_n && tx_valid[k] && tx_ready[k] && tx_last[k]) in_frame[k] = 0;
      else if (rst_n && tx_valid[k]) in_frame[k] = 1;
    end
  end

  // measurements of the client
  int meas_n = 0;
  ts_t m1, m2, m3, m4;
  always @(posedge clk) if (rst_n && meas_valid[0]) begin
    meas_n++; m1 = t1[0]; m2 = t2[0]; m3 = t3[0]; m4 = t4[0];
  end

  // ---- receive side ----
  ts_t sent_now;   // local time when the first byte was presented
  task automatic send(int k, bytes_t f);
    for (int i = 0; i < f.size(); i++) begin
      @(negedge clk);
      if (i == 0) sent_now = now;
      rx_data[k] = f[i]; rx_valid[k] = 1; rx_last[k] = (i == f.size() - 1);
    end
    @(negedge clk);
    rx_valid[k] = 0; rx_last[k] = 0;
    repeat (3) @(negedge clk);
  endtask

  task automatic next_frame(int k, output bytes_t f, output ts_t t, output int c, input int maxc = 5000);
    int w = 0;
    while (frames[k].size() == 0 && w < maxc) begin @(negedge clk); w++; end
    check(frames[k].size() > 0, $sformatf("dut %0d sent a frame", k));
    if (frames[k].size() > 0) begin
      f = frames[k].pop_front(); t = start_now[k].pop_front(); c = start_cyc[k].pop_front();
    end else begin
      f = {}; t = 0; c = 0;
    end
  endtask

  function automatic bit ipv4_ok(bytes_t f);
    bytes_t h = f;
    return h.size() >= 34 && get(h, 12, 2) == 16'h0800 && h[14] == 8'h45 && h[23] == 8'd17
           && ip_csum(h) == 16'h0000;
  endfunction

  initial begin
    bytes_t f;
    ts_t t, t_req;
    int c, c_prev;
    for (int k = 0; k < 2; k++) begin rx_data[k] = 0; rx_valid[k] = 0; rx_last[k] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ================= client =================
    next_frame(0, f, t, c);
    check(f.size() == 342, $sformatf("BOOTP request length %0d", f.size()));
    check(get(f, 0, 6) == 48'hFFFF_FFFF_FFFF && get(f, 6, 6) == CMAC, "BOOTP request MACs");
    check(ipv4_ok(f), "BOOTP request IPv4 header and checksum");
    check(get(f, 34, 2) == 68 && get(f, 36, 2) == 67 && get(f, 38, 2) == 308, "BOOTP ports and length");
    check(f[42] == 1 && f[43] == 1 && f[44] == 6 && get(f, 70, 6) == CMAC, "BOOTP op, htype, chaddr");
    check(get(f, 278, 4) == 32'h63825363 && f[282] == 8'hFF, "BOOTP magic cookie and end option");
    c_prev = c;
    next_frame(0, f, t, c);
    check(f.size() == 342 && c - c_prev >= 2 * HZ - 5 && c - c_prev <= 2 * HZ + 5,
          $sformatf("BOOTP retry after %0d cycles", c - c_prev));
    send(0, bootp_reply(CMAC, HMAC, 32'h1234, CMAC, CIP, 32'hFFFFFF00, SIP, 1, 2, 16, -5));
    check(!cfg_done[0], "BOOTP reply with wrong xid ignored");
    send(0, bootp_reply(48'hFFFF_FFFF_FFFF, HMAC, 32'h5354_0001, CMAC, CIP, 32'hFFFFFF00, SIP, 1, 3, 16, -5));
    check(cfg_done[0], "client configured");
    check(cfg[0].my_ip == CIP && cfg[0].netmask == 32'hFFFFFF00 && cfg[0].ntp_ip == SIP,
          "addresses from BOOTP");
    check(cfg[0].poll_exp == 1 && cfg[0].q == 3 && cfg[0].baud_div == 16 && cfg[0].freq_trim == -5,
          "clock options from BOOTP");
    // ARP for the server
    next_frame(0, f, t, c);
    check(f.size() == 60 && get(f, 12, 2) == 16'h0806 && get(f, 20, 2) == 1, "ARP request");
    check(get(f, 22, 6) == CMAC && get(f, 28, 4) == CIP && get(f, 38, 4) == SIP, "ARP request fields");
    send(0, arp(2, CMAC, SMAC, SIP, CMAC, CIP));
    // NTP request
    next_frame(0, f, t, c);
    check(f.size() == 90 && ipv4_ok(f), "NTP request length and IPv4 header");
    check(get(f, 0, 6) == SMAC && get(f, 26, 4) == CIP && get(f, 30, 4) == SIP, "NTP request addresses");
    check(get(f, 34, 2) == 123 && get(f, 36, 2) == 123 && f[42] == 8'h23 && f[44] == 1, "NTP request header");
    check(get(f, 82, 8) == ts_to_ntp(t), $sformatf("T1 %h expected %h", get(f, 82, 8), ts_to_ntp(t)));
    t_req = ntp_to_ts(get(f, 82, 8));
    c_prev = c;
    // reply: server times 5 s ahead
    send(0, ntp(CMAC, SMAC, SIP, CIP, 8'h24, ts_to_ntp(t_req), ts_to_ntp(t_req + (TS_W'(5) << 22)),
                ts_to_ntp(t_req + (TS_W'(5) << 22) + 100)));
    check(meas_n == 1, "reply gives a measurement");
    check(m1 == t_req && m2 == t_req + (TS_W'(5) << 22) && m3 == t_req + (TS_W'(5) << 22) + 100
          && m4 == sent_now, "measurement timestamps t1..t4");
    // a second copy (stale originate now) is dropped
    send(0, ntp(CMAC, SMAC, SIP, CIP, 8'h24, ts_to_ntp(t_req), 0, 0));
    check(meas_n == 1 && ntp_dropped[0] == 1, "duplicate reply dropped");
    // poll interval 2^1 s
    next_frame(0, f, t, c);
    check(f.size() == 90 && c - c_prev >= 2 * HZ - 5 && c - c_prev <= 2 * HZ + 5,
          $sformatf("poll interval %0d cycles", c - c_prev));
    // reply to an older request: originate does not match, not used
    send(0, ntp(CMAC, SMAC, SIP, CIP, 8'h24, get(f, 82, 8) ^ 64'h1, 0, 0));
    check(meas_n == 1 && ntp_dropped[0] == 2, "reply with a stale originate timestamp dropped");
    // unsynchronised server: LI = 3 reply is not used
    send(0, ntp(CMAC, SMAC, SIP, CIP, 8'hE4, get(f, 82, 8), 0, 0));
    check(meas_n == 1, "reply from unsynchronised server ignored");
    // ARP request for the client's address
    send(0, arp(1, 48'hFFFF_FFFF_FFFF, HMAC, HIP, 0, CIP));
    next_frame(0, f, t, c);
    check(f.size() == 60 && get(f, 0, 6) == HMAC && get(f, 20, 2) == 2, "ARP reply");
    check(get(f, 22, 6) == CMAC && get(f, 28, 4) == CIP && get(f, 32, 6) == HMAC && get(f, 38, 4) == HIP,
          "ARP reply fields");
    check(arp_replies[0] == 1, "ARP reply counted");

    // ================= server =================
    while (frames[1].size() == 0) @(negedge clk);
    next_frame(1, f, t, c);
    check(f.size() == 342, "server BOOTP request");
    send(1, bootp_reply(48'hFFFF_FFFF_FFFF, HMAC, 32'h5354_0001, SMAC, SIP, 32'hFFFFFF00, 0, 0, 2, 10417, 0));
    check(cfg_done[1] && cfg[1].my_ip == SIP, "server configured");
    // a BOOTP retry may have started before the reply arrived: let it finish
    while (in_frame[1] || tx_valid[1]) @(negedge clk);
    frames[1] = {}; start_now[1] = {}; start_cyc[1] = {};
    send(1, ntp(SMAC, CMAC, CIP, SIP, 8'h23, 0, 0, 64'h1122334455667788));
    t_req = sent_now;
    next_frame(1, f, t, c);
    check(f.size() == 90 && ipv4_ok(f), "NTP reply length and IPv4 header");
    check(get(f, 0, 6) == CMAC && get(f, 6, 6) == SMAC && get(f, 26, 4) == SIP && get(f, 30, 4) == CIP,
          "NTP reply addresses");
    check(f[42] == 8'hE4 && f[43] == 1 && get(f, 54, 4) == 32'h47505300, "LI 3 while unsynchronised, stratum 1, GPS");
    check(get(f, 66, 8) == 64'h1122334455667788, "originate = request transmit");
    check(get(f, 74, 8) == ts_to_ntp(t_req), "receive = request arrival");
    check(get(f, 82, 8) == ts_to_ntp(t), "transmit = reply start");
    check(get(f, 58, 8) == ts_to_ntp(ref_ts), "reference timestamp");
    synced = 1;
    send(1, ntp(SMAC, CMAC, CIP, SIP, 8'h23, 0, 0, 64'h5));
    next_frame(1, f, t, c);
    check(f[42] == 8'h24 && get(f, 66, 8) == 64'h5, "LI 0 when synchronised");
    // stalled transmitter: three requests, one served at once, one waits, one dropped
    stall[1] = 1;
    repeat (2) @(negedge clk);
    send(1, ntp(SMAC, CMAC, CIP, SIP, 8'h23, 0, 0, 64'h10));
    send(1, ntp(SMAC, CMAC, CIP, SIP, 8'h23, 0, 0, 64'h11));
    send(1, ntp(SMAC, CMAC, CIP, SIP, 8'h23, 0, 0, 64'h12));
    check(ntp_dropped[1] == 1, "third request dropped while the transmitter stalls");
    stall[1] = 0;
    next_frame(1, f, t, c);
    check(get(f, 66, 8) == 64'h10, "first stalled request answered");
    next_frame(1, f, t, c);
    check(get(f, 66, 8) == 64'h11, "waiting request answered");
    // request to another address: no answer
    send(1, ntp(SMAC, CMAC, CIP, 32'h0A000099, 8'h23, 0, 0, 64'h13));
    repeat (300) @(negedge clk);
    check(frames[1].size() == 0, "request for another address ignored");
    check(ntp_sent[1] == 4 && ntp_received[1] == 5, $sformatf("server counters %0d %0d", ntp_sent[1], ntp_received[1]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
