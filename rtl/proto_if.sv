// proto_if: protocol and configuration interface, the control unit of an
// SNTP server (IS_SERVER = 1) or client (IS_SERVER = 0).
//
// It speaks BOOTP, ARP, IPv4, UDP and NTP directly on the MAC's frame byte
// stream (see proto_rx and proto_tx) and sequences the whole station:
//  1. Configuration: a BOOTP request (broadcast, client port 68 to server
//     port 67, transaction id BOOTP_XID, our MAC as chaddr) is sent every
//     RETRY_S seconds until a matching BOOTP reply arrives. The reply gives
//     the IP address (yiaddr) and, in RFC 1497 vendor options, the network
//     mask (1), the NTP server (42) and the clock parameters: poll exponent p
//     (224), attenuation q (225), UART bit period (226) and frequency trim
//     (227). Options that are absent keep their reset values (p = 0, q = 2,
//     4800 baud, no trim). cfg_done then rises and stays high.
//  2. Client only: the NTP server's MAC address is resolved with ARP
//     (request repeated every second until answered).
//  3. Normal operation. Both roles answer ARP requests for their address.
//     The client sends an NTP request (version 4, mode 3) every 2^p seconds;
//     its transmit timestamp T1 is the local time at which the frame starts.
//     A mode-4 reply from the server whose originate timestamp equals T1 is
//     turned into one measurement (meas_valid with t1..t4, t4 being the
//     local time at which the reply's first byte arrived); replies from an
//     unsynchronised server (leap indicator 3) are discarded.
//     The server answers each NTP request (mode 3) with a mode-4 reply,
//     stratum 1, reference id "GPS", originate = the request's transmit
//     timestamp, receive = T2 (arrival of the request's first byte) and
//     transmit = T3 (start of the reply frame). LI is 0 while 'synced' is
//     high and 3 otherwise. One request can wait while a reply is being
//     sent; a request arriving while one is already waiting is dropped and
//     counted.
// Transmit priority: ARP reply, NTP reply, own requests.
//
// The retry and poll timers count system clock cycles (CLK_HZ per second)
// from the moment the previous request was queued. Timestamps are taken on the MAC side of this block, so
// the fixed MAC/PHY latency is not included (the same for every packet).
//
// From the source design: the protocols handled (BOOTP, IP, ARP, UDP, NTP),
// the configuration items (address, mask, NTP server, poll interval, baud
// rate, clock tuning), the control role and timestamp registration. Option
// codes 224-227, the retry timing, queue depth and frame layouts beyond the
// standards are this design's choices.
module proto_if
  import sntp_pkg::*;
#(
  parameter bit          IS_SERVER = 1'b0,
  parameter logic [47:0] MAC_ADDR  = 48'h02_00_00_00_00_02,
  parameter int unsigned CLK_HZ    = 50_000_000,
  parameter int unsigned RETRY_S   = 2,
  parameter logic [31:0] BOOTP_XID = 32'h5354_0001
) (
  input  logic        clk,
  input  logic        rst_n,
  input  ts_t         now,
  // MAC receive stream
  input  logic [7:0]  rx_data,
  input  logic        rx_valid,
  input  logic        rx_last,
  // MAC transmit stream
  output logic [7:0]  tx_data,
  output logic        tx_valid,
  output logic        tx_last,
  input  logic        tx_ready,
  // configuration
  output cfg_t        cfg,
  output logic        cfg_done,
  // server: state of the local clock
  input  logic        synced,
  input  ts_t         ref_ts,
  // client: measurement to the synchronization module
  output logic        meas_valid,
  output ts_t         t1,
  output ts_t         t2,
  output ts_t         t3,
  output ts_t         t4,
  // statistics
  output logic [15:0] ntp_sent,       // requests (client) or replies (server)
  output logic [15:0] ntp_received,   // accepted replies (client) or requests (server)
  output logic [15:0] ntp_dropped,
  output logic [15:0] arp_replies,
  output logic [15:0] bootp_requests
);

  localparam logic [47:0] BCAST = 48'hFFFF_FFFF_FFFF;

  // ---------------- rx / tx engines ----------------
  logic      rx_done;
  rx_frame_t frm;
  proto_rx u_rx (
    .clk, .rst_n, .now, .rx_data, .rx_valid, .rx_last, .done(rx_done), .frm
  );

  logic      tx_start, tx_busy;
  tx_frame_t tx_fr;
  ts_t       tx_ts;
  proto_tx u_tx (
    .clk, .rst_n, .mac_addr(MAC_ADDR), .now, .start(tx_start), .fr(tx_fr),
    .busy(tx_busy), .tx_ts, .tx_data, .tx_valid, .tx_last, .tx_ready
  );

  // ---------------- receive classification ----------------
  logic is_ip_udp, to_me_mac, to_me_ip;
  assign is_ip_udp = frm.eth_type == ETH_IPV4 && frm.ip_vihl == 8'h45 && frm.ip_proto == IP_UDP;
  assign to_me_mac = frm.eth_dst == MAC_ADDR || frm.eth_dst == BCAST;
  assign to_me_ip  = frm.ip_dst == cfg.my_ip;

  logic rx_arp_req, rx_arp_rep, rx_bootp, rx_ntp_req, rx_ntp_rep;
  assign rx_arp_req = rx_done && cfg_done && frm.eth_type == ETH_ARP && frm.arp_oper == 16'd1
                      && frm.arp_tpa == cfg.my_ip;
  assign rx_arp_rep = rx_done && frm.eth_type == ETH_ARP && frm.arp_oper == 16'd2
                      && to_me_mac && frm.arp_spa == cfg.ntp_ip;
  assign rx_bootp   = rx_done && !cfg_done && is_ip_udp && to_me_mac && frm.udp_dport == PORT_BOOTPC
                      && frm.bp_op == 8'd2 && frm.bp_xid == BOOTP_XID && frm.bp_chaddr == MAC_ADDR
                      && frm.bp_cookie == BOOTP_COOKIE;
  assign rx_ntp_req = rx_done && cfg_done && is_ip_udp && frm.eth_dst == MAC_ADDR && to_me_ip
                      && frm.udp_dport == PORT_NTP && frm.ntp_b0[2:0] == 3'd3;
  assign rx_ntp_rep = rx_done && cfg_done && is_ip_udp && frm.eth_dst == MAC_ADDR && to_me_ip
                      && frm.udp_dport == PORT_NTP && frm.ntp_b0[2:0] == 3'd4
                      && frm.ip_src == cfg.ntp_ip;

  // ---------------- control ----------------
  typedef enum logic [2:0] {C_BOOT_SEND, C_BOOT_WAIT, C_ARP_SEND, C_ARP_WAIT, C_RUN} cstate_e;
  cstate_e st;

  logic [47:0] timer;         // cycles in the current wait
  logic        own_pend;      // own request waiting for the transmitter
  frame_kind_e own_kind;
  logic        t1_capture, t1_capture_d, t1_valid;
  logic [47:0] srv_mac;

  logic        arp_pend;
  logic [47:0] arp_tha;
  logic [31:0] arp_tpa;

  logic        rep_pend;
  logic [47:0] rep_mac;
  logic [31:0] rep_ip;
  logic [63:0] rep_org, rep_rcv;
  logic [7:0]  rep_poll;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= C_BOOT_SEND;
      cfg <= '{my_ip: '0, netmask: '0, ntp_ip: '0, poll_exp: 4'd0, q: 4'd2,
               baud_div: 16'(CLK_HZ / 4800), freq_trim: '0};
      cfg_done <= 1'b0;
      timer <= '0;
      own_pend <= 1'b0; own_kind <= FR_NONE;
      t1_capture <= 1'b0; t1_capture_d <= 1'b0; t1_valid <= 1'b0;
      srv_mac <= '0;
      arp_pend <= 1'b0; arp_tha <= '0; arp_tpa <= '0;
      rep_pend <= 1'b0; rep_mac <= '0; rep_ip <= '0; rep_org <= '0; rep_rcv <= '0; rep_poll <= '0;
      tx_start <= 1'b0; tx_fr <= '0;
      meas_valid <= 1'b0;
      t1 <= '0; t2 <= '0; t3 <= '0; t4 <= '0;
      ntp_sent <= '0; ntp_received <= '0; ntp_dropped <= '0;
      arp_replies <= '0; bootp_requests <= '0;
    end else begin
      tx_start   <= 1'b0;
      meas_valid <= 1'b0;
      t1_capture <= 1'b0;
      if (timer != '1) timer <= timer + 48'd1;

      // T1 is the transmit timestamp the builder latched at frame start
      t1_capture_d <= t1_capture;
      if (t1_capture_d) begin
        t1       <= tx_ts;
        t1_valid <= 1'b1;
      end

      // ---- transmit arbitration ----
      if (!tx_busy && !tx_start) begin
        tx_fr <= '0;
        if (arp_pend && !(rx_arp_req)) begin
          tx_fr.kind    <= FR_ARP_REPLY;
          tx_fr.dst_mac <= arp_tha;
          tx_fr.src_ip  <= cfg.my_ip;
          tx_fr.arp_tha <= arp_tha;
          tx_fr.arp_tpa <= arp_tpa;
          tx_start      <= 1'b1;
          arp_pend      <= 1'b0;
          arp_replies   <= arp_replies + 16'd1;
        end else if (IS_SERVER && rep_pend) begin
          tx_fr.kind     <= FR_NTP_REPLY;
          tx_fr.dst_mac  <= rep_mac;
          tx_fr.src_ip   <= cfg.my_ip;
          tx_fr.dst_ip   <= rep_ip;
          tx_fr.ntp_b0   <= {synced ? 2'b00 : 2'b11, 3'd4, 3'd4};
          tx_fr.ntp_poll <= rep_poll;
          tx_fr.ntp_ref  <= ts_to_ntp(ref_ts);
          tx_fr.ntp_org  <= rep_org;
          tx_fr.ntp_rcv  <= rep_rcv;
          tx_start       <= 1'b1;
          rep_pend       <= 1'b0;
          ntp_sent       <= ntp_sent + 16'd1;
        end else if (own_pend && !rx_bootp && !(rx_arp_rep && st == C_ARP_WAIT)) begin
          tx_fr.kind <= own_kind;
          tx_start   <= 1'b1;
          own_pend   <= 1'b0;
          unique case (own_kind)
            FR_BOOTP_REQ: begin
              tx_fr.dst_mac  <= BCAST;
              tx_fr.src_ip   <= '0;
              tx_fr.dst_ip   <= '1;
              tx_fr.xid      <= BOOTP_XID;
              bootp_requests <= bootp_requests + 16'd1;
            end
            FR_ARP_REQ: begin
              tx_fr.dst_mac <= BCAST;
              tx_fr.src_ip  <= cfg.my_ip;
              tx_fr.arp_tpa <= cfg.ntp_ip;
            end
            default: begin   // NTP request
              tx_fr.dst_mac  <= srv_mac;
              tx_fr.src_ip   <= cfg.my_ip;
              tx_fr.dst_ip   <= cfg.ntp_ip;
              tx_fr.ntp_b0   <= 8'h23;           // LI 0, version 4, mode 3
              tx_fr.ntp_poll <= 8'(cfg.poll_exp);
              t1_capture     <= 1'b1;
              t1_valid       <= 1'b0;
              ntp_sent       <= ntp_sent + 16'd1;
            end
          endcase
        end
      end

      // ---- sequencing of own requests ----
      unique case (st)
        C_BOOT_SEND: begin
          own_pend <= 1'b1; own_kind <= FR_BOOTP_REQ;
          timer <= '0;
          st <= C_BOOT_WAIT;
        end
        C_BOOT_WAIT: if (timer >= 48'(RETRY_S) * 48'(CLK_HZ)) st <= C_BOOT_SEND;
        C_ARP_SEND: begin
          own_pend <= 1'b1; own_kind <= FR_ARP_REQ;
          timer <= '0;
          st <= C_ARP_WAIT;
        end
        C_ARP_WAIT: if (timer >= 48'(CLK_HZ)) st <= C_ARP_SEND;
        C_RUN: if (!IS_SERVER && timer >= (48'(CLK_HZ) << cfg.poll_exp)) begin
          own_pend <= 1'b1; own_kind <= FR_NTP_REQ;
          timer <= '0;
        end
        default: st <= C_BOOT_SEND;
      endcase

      // ---- received frames ----
      if (rx_bootp) begin
        cfg.my_ip <= frm.bp_yiaddr;
        if (frm.opt_mask_ok) cfg.netmask   <= frm.opt_mask;
        if (frm.opt_ntp_ok)  cfg.ntp_ip    <= frm.opt_ntp;
        if (frm.opt_poll_ok) cfg.poll_exp  <= frm.opt_poll[3:0];
        if (frm.opt_q_ok)    cfg.q         <= frm.opt_q[3:0];
        if (frm.opt_baud_ok) cfg.baud_div  <= frm.opt_baud;
        if (frm.opt_trim_ok) cfg.freq_trim <= frm.opt_trim;
        cfg_done <= 1'b1;
        own_pend <= 1'b0;
        timer    <= '0;
        if (IS_SERVER) begin
          st <= C_RUN;
        end else begin
          st <= C_ARP_SEND;
        end
      end
      if (!IS_SERVER && rx_arp_rep && st == C_ARP_WAIT) begin
        srv_mac  <= frm.arp_sha;
        st       <= C_RUN;
        timer    <= 48'(CLK_HZ) << cfg.poll_exp;   // first request at once
        own_pend <= 1'b0;
      end
      if (rx_arp_req) begin
        arp_pend <= 1'b1;
        arp_tha  <= frm.arp_sha;
        arp_tpa  <= frm.arp_spa;
      end
      if (IS_SERVER && rx_ntp_req) begin
        ntp_received <= ntp_received + 16'd1;
        if (rep_pend) begin
          ntp_dropped <= ntp_dropped + 16'd1;
        end else begin
          rep_pend <= 1'b1;
          rep_mac  <= frm.eth_src;
          rep_ip   <= frm.ip_src;
          rep_org  <= frm.ntp_xmt;
          rep_rcv  <= ts_to_ntp(frm.rx_ts);
          rep_poll <= frm.ntp_poll;
        end
      end
      if (!IS_SERVER && rx_ntp_rep) begin
        if (t1_valid && frm.ntp_org == ts_to_ntp(t1) && frm.ntp_b0[7:6] != 2'b11) begin
          meas_valid   <= 1'b1;
          t2           <= ntp_to_ts(frm.ntp_rcv);
          t3           <= ntp_to_ts(frm.ntp_xmt);
          t4           <= frm.rx_ts;
          t1_valid     <= 1'b0;     // one measurement per request
          ntp_received <= ntp_received + 16'd1;
        end else begin
          ntp_dropped <= ntp_dropped + 16'd1;
        end
      end

    end
  end

endmodule
