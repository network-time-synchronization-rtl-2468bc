// tb_net_pkg: testbench helpers for the SNTP design.
//
// Builds Ethernet frames (as byte queues, destination MAC first, no FCS) for
// BOOTP replies, ARP requests/replies and NTP packets, reads fields back out
// of frames, builds NMEA RMC sentences with their checksum, and converts a
// civil UTC date and time to NTP seconds with the closed-form days-from-civil
// formula (independent of the year/month loops used in the design).
package tb_net_pkg;

  typedef byte unsigned bytes_t[$];

  function automatic void put(ref bytes_t q, input longint unsigned v, input int n);
    for (int i = n - 1; i >= 0; i--) q.push_back(byte'(v >> (8 * i)));
  endfunction

  function automatic longint unsigned get(const ref bytes_t q, input int off, input int n);
    longint unsigned v = 0;
    for (int i = 0; i < n; i++) v = (v << 8) | longint'(q[off + i]);
    return v;
  endfunction

  function automatic bit [15:0] ip_csum(const ref bytes_t q);
    int unsigned s = 0;
    for (int i = 14; i < 34; i += 2) s += (int'(q[i]) << 8) | int'(q[i + 1]);
    while (s >> 16) s = (s & 16'hFFFF) + (s >> 16);
    return ~s[15:0];
  endfunction

  // Ethernet + IPv4 + UDP header, payload length plen
  function automatic bytes_t udp_hdr(bit [47:0] dmac, bit [47:0] smac, bit [31:0] sip,
                                     bit [31:0] dip, bit [15:0] sport, bit [15:0] dport, int plen);
    bytes_t q;
    bit [15:0] c;
    put(q, dmac, 6); put(q, smac, 6); put(q, 16'h0800, 2);
    put(q, 16'h4500, 2); put(q, 20 + 8 + plen, 2); put(q, 16'h1234, 2); put(q, 0, 2);
    put(q, 16'h4011, 2); put(q, 0, 2); put(q, sip, 4); put(q, dip, 4);
    c = ip_csum(q);
    q[24] = c[15:8]; q[25] = c[7:0];
    put(q, sport, 2); put(q, dport, 2); put(q, 8 + plen, 2); put(q, 0, 2);
    return q;
  endfunction

  function automatic bytes_t bootp_reply(bit [47:0] dmac, bit [47:0] smac, bit [31:0] xid,
                                         bit [47:0] chaddr, bit [31:0] yiaddr, bit [31:0] mask,
                                         bit [31:0] ntp, int p, int qq, int baud, int trim);
    bytes_t q = udp_hdr(dmac, smac, 32'h0A000001, 32'hFFFFFFFF, 67, 68, 300);
    put(q, 8'd2, 1); put(q, 1, 1); put(q, 6, 1); put(q, 0, 1);
    put(q, xid, 4); put(q, 0, 4);
    put(q, 0, 4); put(q, yiaddr, 4); put(q, 32'h0A000001, 4); put(q, 0, 4);
    put(q, chaddr, 6);
    for (int i = 0; i < 10 + 64 + 128; i++) q.push_back(8'h00);
    put(q, 32'h63825363, 4);
    put(q, 8'd0, 1);                               // a pad option
    put(q, 8'd1, 1);   put(q, 4, 1); put(q, mask, 4);
    put(q, 8'd42, 1);  put(q, 8, 1); put(q, ntp, 4); put(q, 32'h0A0000FE, 4);
    put(q, 8'd12, 1);  put(q, 3, 1); put(q, 24'h616263, 3);  // host name, ignored
    put(q, 8'd224, 1); put(q, 1, 1); put(q, p, 1);
    put(q, 8'd225, 1); put(q, 1, 1); put(q, qq, 1);
    put(q, 8'd226, 1); put(q, 2, 1); put(q, baud, 2);
    put(q, 8'd227, 1); put(q, 4, 1); put(q, trim, 4);
    put(q, 8'd255, 1);
    while (q.size() < 342) q.push_back(8'h00);
    return q;
  endfunction

  function automatic bytes_t arp(bit [15:0] oper, bit [47:0] dmac, bit [47:0] sha, bit [31:0] spa,
                                 bit [47:0] tha, bit [31:0] tpa);
    bytes_t q;
    put(q, dmac, 6); put(q, sha, 6); put(q, 16'h0806, 2);
    put(q, 16'h0001, 2); put(q, 16'h0800, 2); put(q, 8'd6, 1); put(q, 8'd4, 1);
    put(q, oper, 2); put(q, sha, 6); put(q, spa, 4); put(q, tha, 6); put(q, tpa, 4);
    while (q.size() < 60) q.push_back(8'h00);
    return q;
  endfunction

  function automatic bytes_t ntp(bit [47:0] dmac, bit [47:0] smac, bit [31:0] sip, bit [31:0] dip,
                                 bit [7:0] b0, bit [63:0] org, bit [63:0] rcv, bit [63:0] xmt);
    bytes_t q = udp_hdr(dmac, smac, sip, dip, 123, 123, 48);
    put(q, b0, 1); put(q, (b0[2:0] == 4) ? 1 : 0, 1); put(q, 0, 1); put(q, 8'hEA, 1);
    put(q, 0, 4); put(q, 0, 4); put(q, 0, 4); put(q, 0, 8);
    put(q, org, 8); put(q, rcv, 8); put(q, xmt, 8);
    return q;
  endfunction

  // ---------------- time ----------------
  function automatic longint days_from_civil(int y, int m, int d);
    int yy = (m <= 2) ? y - 1 : y;
    int era = yy / 400;
    int yoe = yy - era * 400;
    int mp  = (m + 9) % 12;
    int doy = (153 * mp + 2) / 5 + d - 1;
    int doe = yoe * 365 + yoe / 4 - yoe / 100 + doy;
    return longint'(era) * 146097 + doe - 719468;   // days since 1970-01-01
  endfunction

  function automatic bit [31:0] ntp_seconds(int y, int mo, int d, int h, int mi, int s);
    longint t = days_from_civil(y, mo, d) * 86400 + h * 3600 + mi * 60 + s + 64'd2208988800;
    return t[31:0];
  endfunction

  function automatic string rmc(int h, int mi, int s, int d, int mo, int y, byte status,
                                bit bad_cs = 0, string lead = "GP");
    string body, hx;
    byte unsigned cs = 0;
    body = $sformatf("%sRMC,%02d%02d%02d.00,%s,3723.2475,N,00559.3720,W,0.0,0.0,%02d%02d%02d,,,A",
                     lead, h, mi, s, string'(status), d, mo, y % 100);
    for (int i = 0; i < body.len(); i++) cs ^= body[i];
    if (bad_cs) cs ^= 8'h01;
    hx = $sformatf("%02x", cs);
    return {"$", body, "*", hx.toupper(), "\r\n"};
  endfunction

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

  // GPS-style RMC sentence for NTP second sec (years 1968..2036)
  function automatic string rmc_at(bit [31:0] sec);
    longint t = longint'(sec) - 64'd2208988800;
    int y, m, d;
    civil(t / 86400, y, m, d);
    return rmc(int'((t % 86400) / 3600), int'((t % 3600) / 60), int'(t % 60), d, m, y, "A");
  endfunction

endpackage
