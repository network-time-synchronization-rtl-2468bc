// sntp_client: hardware SNTP client that emulates a GPS receiver.
//
// Blocks and connections follow the client block diagram: the protocol and
// configuration interface obtains the configuration by BOOTP, resolves the
// NTP server's MAC address by ARP and then polls the server every 2^p
// seconds; each valid reply becomes a four-timestamp measurement for the
// synchronization module, which computes offset and delay with the on-wire
// equations and disciplines the local clock (step for large offsets,
// frequency slewing otherwise). The time transmission module raises the PPS
// output at every second of the local clock and sends an NMEA RMC sentence
// for that second through the UART's transmit side, as a GPS receiver would.
//
// The Ethernet MAC, the PHY and the RS-232 transceiver are outside this
// module: the MAC appears as a frame byte stream (rx_*/tx_*), the serial
// line to the equipment as txd and the pulse as pps_out. Clock: one system
// clock (50 MHz nominal, CLK_HZ), asynchronous active-low reset.
module sntp_client
  import sntp_pkg::*;
#(
  parameter int unsigned CLK_HZ   = 50_000_000,
  parameter logic [47:0] MAC_ADDR = 48'h02_00_00_00_00_02
) (
  input  logic        clk,
  input  logic        rst_n,
  // Ethernet MAC frame interface
  input  logic [7:0]  rx_data,
  input  logic        rx_valid,
  input  logic        rx_last,
  output logic [7:0]  tx_data,
  output logic        tx_valid,
  output logic        tx_last,
  input  logic        tx_ready,
  // to the equipment (GPS receiver emulation)
  output logic        txd,
  output logic        pps_out,
  // status
  output ts_t         now,
  output logic        cfg_done,
  output logic        locked,
  output ofs_t        last_offset,
  output ofs_t        last_delay,
  output logic        offset_valid,
  output logic        stepped,
  output logic signed [47:0] freq_corr,
  output logic [15:0] ntp_requests,
  output logic [15:0] ntp_replies,
  output logic [15:0] rmc_sent
);

  cfg_t        cfg;
  logic        sec_tick;
  logic        meas_valid;
  ts_t         t1, t2, t3, t4;
  logic [7:0]  u_tx_data, u_rx_data;
  logic        u_tx_valid, u_tx_ready, u_rx_valid, u_rx_err;
  logic signed [47:0] slew;
  logic [15:0] ntp_dropped, arp_replies, bootp_requests;

  proto_if #(.IS_SERVER(1'b0), .MAC_ADDR(MAC_ADDR), .CLK_HZ(CLK_HZ)) u_proto (
    .clk, .rst_n, .now,
    .rx_data, .rx_valid, .rx_last, .tx_data, .tx_valid, .tx_last, .tx_ready,
    .cfg, .cfg_done, .synced(locked), .ref_ts('0),
    .meas_valid, .t1, .t2, .t3, .t4,
    .ntp_sent(ntp_requests), .ntp_received(ntp_replies), .ntp_dropped,
    .arp_replies, .bootp_requests
  );

  sntp_sync #(.CLK_HZ(CLK_HZ)) u_sync (
    .clk, .rst_n, .poll_exp(cfg.poll_exp), .q(cfg.q), .freq_trim(cfg.freq_trim),
    .meas_valid, .t1, .t2, .t3, .t4,
    .now, .sec_tick, .offset_valid, .offset(last_offset), .delay(last_delay), .stepped,
    .locked, .freq_corr, .slew
  );

  time_tx #(.CLK_HZ(CLK_HZ)) u_ttx (
    .clk, .rst_n, .now, .sec_tick, .time_ok(locked), .pps_out,
    .tx_data(u_tx_data), .tx_valid(u_tx_valid), .tx_ready(u_tx_ready), .sent_count(rmc_sent)
  );

  uart u_uart (
    .clk, .rst_n, .baud_div(cfg.baud_div),
    .tx_data(u_tx_data), .tx_valid(u_tx_valid), .tx_ready(u_tx_ready), .txd,
    .rxd(1'b1), .rx_data(u_rx_data), .rx_valid(u_rx_valid), .rx_frame_err(u_rx_err)
  );

endmodule
