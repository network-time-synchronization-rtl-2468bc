// sntp_pkg: types, constants and helper functions shared by the hardware
// SNTP server and client.
//
// Local time is kept as an NTP-style timestamp with a 32-bit seconds field
// (seconds since 1900-01-01 00:00 UTC) and a 22-bit binary fraction of the
// second, i.e. a resolution of 2^-22 s (about 238 ns). In NTP packets the
// fraction is widened to 32 bits by appending ten zero bits. Signed time
// differences (offsets, delays) use two extra bits and the same 2^-22 s unit.
//
// The configuration record holds what the BOOTP reply delivers: the
// station's IP address and network mask, the NTP server address, the poll
// interval exponent p, the attenuation factor q, the UART bit period and a
// frequency trim for the local oscillator.
package sntp_pkg;

  localparam int unsigned SEC_W  = 32;
  localparam int unsigned FRAC_W = 22;
  localparam int unsigned TS_W   = SEC_W + FRAC_W;   // 54
  localparam int unsigned OFS_W  = TS_W + 2;         // 56, signed

  typedef logic [TS_W-1:0]         ts_t;    // {seconds, fraction}
  typedef logic signed [OFS_W-1:0] ofs_t;   // signed, 2^-22 s units

  typedef struct packed {
    logic [31:0]        my_ip;
    logic [31:0]        netmask;
    logic [31:0]        ntp_ip;
    logic [3:0]         poll_exp;   // p: poll interval is 2^p seconds
    logic [3:0]         q;          // attenuation factor of the discipline
    logic [15:0]        baud_div;   // UART bit period in clock cycles
    logic signed [31:0] freq_trim;  // added to the nominal clock increment
  } cfg_t;

  // Byte-stream frame interface to the Ethernet MAC: destination MAC first,
  // no preamble and no FCS (the MAC adds and strips them).
  localparam logic [15:0] ETH_IPV4 = 16'h0800;
  localparam logic [15:0] ETH_ARP  = 16'h0806;
  localparam logic [7:0]  IP_UDP   = 8'd17;
  localparam logic [15:0] PORT_NTP    = 16'd123;
  localparam logic [15:0] PORT_BOOTPS = 16'd67;
  localparam logic [15:0] PORT_BOOTPC = 16'd68;
  localparam logic [31:0] BOOTP_COOKIE = 32'h63825363;

  // Offsets of fields inside an Ethernet/IPv4/UDP frame (no IP options)
  localparam int unsigned OFF_UDP_PAYLOAD = 42;
  localparam int unsigned OFF_BOOTP_OPT   = OFF_UDP_PAYLOAD + 240;  // after cookie

  // Vendor-specific BOOTP options carrying the clock parameters
  localparam logic [7:0] OPT_PAD      = 8'd0;
  localparam logic [7:0] OPT_MASK     = 8'd1;
  localparam logic [7:0] OPT_NTP      = 8'd42;
  localparam logic [7:0] OPT_POLL     = 8'd224;
  localparam logic [7:0] OPT_Q        = 8'd225;
  localparam logic [7:0] OPT_BAUD     = 8'd226;
  localparam logic [7:0] OPT_TRIM     = 8'd227;
  localparam logic [7:0] OPT_END      = 8'd255;

  typedef enum logic [2:0] {
    FR_NONE, FR_ARP_REQ, FR_ARP_REPLY, FR_BOOTP_REQ, FR_NTP_REQ, FR_NTP_REPLY
  } frame_kind_e;

  // Fields of the frame to transmit, filled in by the controller
  typedef struct packed {
    frame_kind_e kind;
    logic [47:0] dst_mac;
    logic [31:0] src_ip;
    logic [31:0] dst_ip;
    logic [31:0] arp_tpa;     // ARP target protocol address
    logic [47:0] arp_tha;     // ARP target hardware address
    logic [7:0]  ntp_b0;      // LI/VN/Mode
    logic [7:0]  ntp_poll;
    logic [63:0] ntp_ref;     // reference timestamp (server)
    logic [63:0] ntp_org;     // originate timestamp (server reply)
    logic [63:0] ntp_rcv;     // receive timestamp (server reply)
    logic [31:0] xid;         // BOOTP transaction id
  } tx_frame_t;

  // Fields captured from a received frame
  typedef struct packed {
    logic [10:0] len;
    logic [47:0] eth_dst;
    logic [47:0] eth_src;
    logic [15:0] eth_type;
    logic [15:0] arp_oper;
    logic [47:0] arp_sha;
    logic [31:0] arp_spa;
    logic [31:0] arp_tpa;
    logic [7:0]  ip_vihl;
    logic [7:0]  ip_proto;
    logic [31:0] ip_src;
    logic [31:0] ip_dst;
    logic [15:0] udp_sport;
    logic [15:0] udp_dport;
    logic [7:0]  ntp_b0;
    logic [7:0]  ntp_poll;
    logic [63:0] ntp_org;
    logic [63:0] ntp_rcv;
    logic [63:0] ntp_xmt;
    logic [7:0]  bp_op;
    logic [31:0] bp_xid;
    logic [31:0] bp_yiaddr;
    logic [47:0] bp_chaddr;
    logic [31:0] bp_cookie;
    logic        opt_mask_ok;
    logic        opt_ntp_ok;
    logic [31:0] opt_mask;
    logic [31:0] opt_ntp;
    logic [7:0]  opt_poll;
    logic [7:0]  opt_q;
    logic [15:0] opt_baud;
    logic [31:0] opt_trim;
    logic        opt_poll_ok;
    logic        opt_q_ok;
    logic        opt_baud_ok;
    logic        opt_trim_ok;
    ts_t         rx_ts;       // local time at the first byte of the frame
  } rx_frame_t;

  function automatic logic [63:0] ts_to_ntp(ts_t t);
    return {t, 10'b0};
  endfunction

  function automatic ts_t ntp_to_ts(logic [63:0] n);
    return n[63:10];
  endfunction

  // Ones' complement sum step used for the IPv4 header checksum
  function automatic logic [15:0] csum_add(logic [15:0] a, logic [15:0] b);
    logic [16:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[15:0] + {15'b0, s[16]};
  endfunction

  function automatic logic is_leap(logic [11:0] year);
    // valid for 1900..2099
    return (year[1:0] == 2'b00) && (year != 12'd1900);
  endfunction

  function automatic logic [8:0] days_in_year(logic [11:0] year);
    return is_leap(year) ? 9'd366 : 9'd365;
  endfunction

  function automatic logic [4:0] days_in_month(logic [3:0] month, logic leap);
    case (month)
      4'd2:                      return leap ? 5'd29 : 5'd28;
      4'd4, 4'd6, 4'd9, 4'd11:   return 5'd30;
      default:                   return 5'd31;
    endcase
  endfunction

  function automatic logic [7:0] hex_char(logic [3:0] n);
    return (n < 4'd10) ? (8'h30 + {4'b0, n}) : (8'h37 + {4'b0, n});
  endfunction

endpackage
