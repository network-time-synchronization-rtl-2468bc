// proto_tx: transmit-side frame builder of the protocol interface.
//
// On start (while not busy) the frame description fr is latched together
// with the current local time, which becomes the frame's transmit timestamp
// (the NTP transmit field T1 at the client, T3 at the server; reported on
// tx_ts). The frame is then streamed to the MAC one byte per accepted cycle
// (tx_valid/tx_ready, tx_last on the final byte), destination MAC first,
// without preamble or FCS. Each byte is selected from header vectors built
// from the latched fields:
//   ARP request / reply : 42 bytes padded with zeros to 60
//   BOOTP request       : Ethernet+IPv4+UDP (42) + 300-byte BOOTP message
//   NTP request / reply : 42 + 48-byte NTP header = 90 bytes
// The IPv4 header checksum is computed from the latched fields; the UDP
// checksum is sent as zero (checksum not used), which IPv4 permits.
// The IP identification field counts frames.
module proto_tx
  import sntp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [47:0] mac_addr,
  input  ts_t         now,
  input  logic        start,
  input  tx_frame_t   fr,
  output logic        busy,
  output ts_t         tx_ts,
  output logic [7:0]  tx_data,
  output logic        tx_valid,
  output logic        tx_last,
  input  logic        tx_ready
);

  tx_frame_t   f;
  logic [10:0] idx, len;
  logic [15:0] ident;

  logic is_arp, is_bootp, is_ntp;
  assign is_arp   = (f.kind == FR_ARP_REQ) || (f.kind == FR_ARP_REPLY);
  assign is_bootp = (f.kind == FR_BOOTP_REQ);
  assign is_ntp   = (f.kind == FR_NTP_REQ) || (f.kind == FR_NTP_REPLY);

  // ---------------- header vectors ----------------
  logic [15:0] ip_len, udp_len, sport, dport;
  assign ip_len  = is_bootp ? 16'd328 : 16'd76;
  assign udp_len = ip_len - 16'd20;
  assign sport   = is_bootp ? PORT_BOOTPC : PORT_NTP;
  assign dport   = is_bootp ? PORT_BOOTPS : PORT_NTP;

  logic [15:0] ip_csum;
  always_comb begin
    logic [15:0] s;
    s = 16'h4500;
    s = csum_add(s, ip_len);
    s = csum_add(s, ident);
    s = csum_add(s, 16'h4000);
    s = csum_add(s, {8'd64, IP_UDP});
    s = csum_add(s, f.src_ip[31:16]);
    s = csum_add(s, f.src_ip[15:0]);
    s = csum_add(s, f.dst_ip[31:16]);
    s = csum_add(s, f.dst_ip[15:0]);
    ip_csum = ~s;
  end

  logic [14*8-1:0] v_eth;
  logic [28*8-1:0] v_arp, v_ipudp;
  logic [48*8-1:0] v_ntp;
  logic [34*8-1:0] v_boot;   // BOOTP bytes 0..33 (op .. chaddr)

  assign v_eth   = {f.dst_mac, mac_addr, is_arp ? ETH_ARP : ETH_IPV4};
  assign v_arp   = {16'h0001, ETH_IPV4, 8'd6, 8'd4,
                    (f.kind == FR_ARP_REPLY) ? 16'd2 : 16'd1,
                    mac_addr, f.src_ip, f.arp_tha, f.arp_tpa};
  assign v_ipudp = {16'h4500, ip_len, ident, 16'h4000, 8'd64, IP_UDP, ip_csum,
                    f.src_ip, f.dst_ip, sport, dport, udp_len, 16'h0000};
  assign v_ntp   = {f.ntp_b0,
                    (f.kind == FR_NTP_REPLY) ? 8'd1 : 8'd0,       // stratum
                    f.ntp_poll,
                    8'hEA,                                          // precision 2^-22
                    32'h0, 32'h0,                                   // root delay, dispersion
                    (f.kind == FR_NTP_REPLY) ? 32'h47505300 : 32'h0, // "GPS"
                    f.ntp_ref, f.ntp_org, f.ntp_rcv, ts_to_ntp(tx_ts)};
  assign v_boot  = {8'd1, 8'd1, 8'd6, 8'd0, f.xid, 16'h0000, 16'h8000,
                    128'h0, mac_addr};

  always_comb begin
    logic [10:0] p;
    tx_data = 8'h00;
    p = idx - 11'd14;
    if (idx < 11'd14) begin
      tx_data = v_eth[(13 - idx) * 8 +: 8];
    end else if (is_arp) begin
      if (idx < 11'd42) tx_data = v_arp[(27 - p) * 8 +: 8];
    end else if (idx < 11'd42) begin
      tx_data = v_ipudp[(27 - p) * 8 +: 8];
    end else begin
      p = idx - 11'd42;
      if (is_ntp) begin
        if (p < 11'd48) tx_data = v_ntp[(47 - p) * 8 +: 8];
      end else if (is_bootp) begin
        if (p < 11'd34)                       tx_data = v_boot[(33 - p) * 8 +: 8];
        else if (p >= 11'd236 && p < 11'd240) tx_data = BOOTP_COOKIE[(239 - p) * 8 +: 8];
        else if (p == 11'd240)                tx_data = OPT_END;
      end
    end
  end

  // ---------------- sequencing ----------------
  assign tx_valid = busy;
  assign tx_last  = busy && (idx == len - 11'd1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f     <= '0;
      idx   <= '0;
      len   <= '0;
      busy  <= 1'b0;
      tx_ts <= '0;
      ident <= '0;
    end else if (!busy) begin
      if (start && fr.kind != FR_NONE) begin
        f     <= fr;
        tx_ts <= now;
        idx   <= '0;
        busy  <= 1'b1;
        unique case (fr.kind)
          FR_ARP_REQ, FR_ARP_REPLY: len <= 11'd60;
          FR_BOOTP_REQ:             len <= 11'd342;
          default:                  len <= 11'd90;
        endcase
      end
    end else if (tx_ready) begin
      if (idx == len - 11'd1) begin
        busy <= 1'b0;
        if (!is_arp) ident <= ident + 16'd1;
      end
      idx <= idx + 11'd1;
    end
  end

endmodule
