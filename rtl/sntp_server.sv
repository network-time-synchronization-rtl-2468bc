// sntp_server: hardware SNTP server referenced to a GPS receiver.
//
// Blocks and connections follow the server block diagram: the time reception
// module takes the GPS receiver's NMEA RMC sentences (through the UART's
// receive side) and its PPS pulse and produces a reference pair (GPS time,
// local time at the PPS edge) once per second. The synchronization module
// treats that pair as a measurement with t1 = t4 = local and t2 = t3 = GPS,
// so its offset is GPS - local, and disciplines the local clock with a poll
// interval of one second (p = 0) and the configured attenuation q. The
// protocol and configuration interface obtains the configuration by BOOTP
// and then answers ARP and NTP requests from the LAN, stamping them with the
// local clock; its replies say "synchronised" while the last GPS offset is
// within the lock limit.
//
// The Ethernet MAC, the PHY and the RS-232 transceiver are outside this
// module: the MAC appears as a frame byte stream (rx_*/tx_*), the GPS serial
// line as gps_rxd and the PPS as gps_pps. Clock: one system clock (50 MHz
// nominal, CLK_HZ), asynchronous active-low reset.
module sntp_server
  import sntp_pkg::*;
#(
  parameter int unsigned CLK_HZ   = 50_000_000,
  parameter logic [47:0] MAC_ADDR = 48'h02_00_00_00_00_01
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
  // GPS receiver
  input  logic        gps_rxd,
  input  logic        gps_pps,
  // status
  output ts_t         now,
  output logic        cfg_done,
  output logic        synced,
  output ofs_t        last_offset,
  output logic        stepped,
  output logic [15:0] ntp_served,
  output logic [15:0] ntp_dropped,
  output logic [15:0] gps_good,
  output logic [15:0] gps_bad
);

  cfg_t        cfg;
  logic        sec_tick;
  logic [7:0]  u_rx_data;
  logic        u_rx_valid, u_rx_err, u_tx_ready, u_txd;
  logic        ref_valid;
  ts_t         ref_time, pps_local, ref_hold;
  logic        offset_valid;
  ofs_t        delay;
  logic signed [47:0] freq_corr, slew;
  logic        meas_valid_unused;
  ts_t         t_unused1, t_unused2, t_unused3, t_unused4;
  logic [15:0] ntp_requests, arp_replies, bootp_requests;

  uart u_uart (
    .clk, .rst_n, .baud_div(cfg.baud_div),
    .tx_data(8'h00), .tx_valid(1'b0), .tx_ready(u_tx_ready), .txd(u_txd),
    .rxd(gps_rxd), .rx_data(u_rx_data), .rx_valid(u_rx_valid), .rx_frame_err(u_rx_err)
  );

  time_rx #(.CLK_HZ(CLK_HZ)) u_trx (
    .clk, .rst_n, .now, .pps_in(gps_pps), .rx_data(u_rx_data), .rx_valid(u_rx_valid),
    .ref_valid, .ref_time, .pps_local, .good_count(gps_good), .bad_count(gps_bad)
  );

  sntp_sync #(.CLK_HZ(CLK_HZ)) u_sync (
    .clk, .rst_n, .poll_exp(4'd0), .q(cfg.q), .freq_trim(cfg.freq_trim),
    .meas_valid(ref_valid && cfg_done), .t1(pps_local), .t2(ref_time), .t3(ref_time), .t4(pps_local),
    .now, .sec_tick, .offset_valid, .offset(last_offset), .delay, .stepped,
    .locked(synced), .freq_corr, .slew
  );

  // reference timestamp of the NTP replies: the last GPS second used
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         ref_hold <= '0;
    else if (ref_valid) ref_hold <= ref_time;
  end

  proto_if #(.IS_SERVER(1'b1), .MAC_ADDR(MAC_ADDR), .CLK_HZ(CLK_HZ)) u_proto (
    .clk, .rst_n, .now,
    .rx_data, .rx_valid, .rx_last, .tx_data, .tx_valid, .tx_last, .tx_ready,
    .cfg, .cfg_done, .synced, .ref_ts(ref_hold),
    .meas_valid(meas_valid_unused), .t1(t_unused1), .t2(t_unused2), .t3(t_unused3), .t4(t_unused4),
    .ntp_sent(ntp_served), .ntp_received(ntp_requests), .ntp_dropped,
    .arp_replies, .bootp_requests
  );

endmodule
