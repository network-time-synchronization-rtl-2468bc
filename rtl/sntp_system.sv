// sntp_system: the complete synchronization system - a GPS-referenced SNTP
// server and an SNTP client that stands in for a GPS receiver at a remote
// terminal unit.
//
// The two stations are separate chips on a shared Ethernet LAN, each with
// its own oscillator, so they stand side by side here with their own clock,
// reset and ports (srv_* and cli_*). Each station's MAC frame stream is
// brought out; the LAN, the MACs and the PHYs lie outside. A BOOTP server on
// the LAN configures both stations. The server disciplines its clock to the
// GPS PPS and RMC sentences; the client disciplines its clock to the server
// through NTP exchanges and drives its own PPS and RMC outputs.
module sntp_system
  import sntp_pkg::*;
#(
  parameter int unsigned CLK_HZ     = 50_000_000,
  parameter logic [47:0] SRV_MAC    = 48'h02_00_00_00_00_01,
  parameter logic [47:0] CLI_MAC    = 48'h02_00_00_00_00_02
) (
  // ---------------- server ----------------
  input  logic        srv_clk,
  input  logic        srv_rst_n,
  input  logic [7:0]  srv_rx_data,
  input  logic        srv_rx_valid,
  input  logic        srv_rx_last,
  output logic [7:0]  srv_tx_data,
  output logic        srv_tx_valid,
  output logic        srv_tx_last,
  input  logic        srv_tx_ready,
  input  logic        gps_rxd,
  input  logic        gps_pps,
  output ts_t         srv_now,
  output logic        srv_cfg_done,
  output logic        srv_synced,
  output ofs_t        srv_offset,
  output logic        srv_stepped,
  output logic [15:0] srv_ntp_served,
  output logic [15:0] srv_ntp_dropped,
  output logic [15:0] srv_gps_good,
  output logic [15:0] srv_gps_bad,
  // ---------------- client ----------------
  input  logic        cli_clk,
  input  logic        cli_rst_n,
  input  logic [7:0]  cli_rx_data,
  input  logic        cli_rx_valid,
  input  logic        cli_rx_last,
  output logic [7:0]  cli_tx_data,
  output logic        cli_tx_valid,
  output logic        cli_tx_last,
  input  logic        cli_tx_ready,
  output logic        cli_txd,
  output logic        cli_pps,
  output ts_t         cli_now,
  output logic        cli_cfg_done,
  output logic        cli_locked,
  output ofs_t        cli_offset,
  output ofs_t        cli_delay,
  output logic        cli_offset_valid,
  output logic        cli_stepped,
  output logic signed [47:0] cli_freq_corr,
  output logic [15:0] cli_ntp_requests,
  output logic [15:0] cli_ntp_replies,
  output logic [15:0] cli_rmc_sent
);

  sntp_server #(.CLK_HZ(CLK_HZ), .MAC_ADDR(SRV_MAC)) u_server (
    .clk(srv_clk), .rst_n(srv_rst_n),
    .rx_data(srv_rx_data), .rx_valid(srv_rx_valid), .rx_last(srv_rx_last),
    .tx_data(srv_tx_data), .tx_valid(srv_tx_valid), .tx_last(srv_tx_last), .tx_ready(srv_tx_ready),
    .gps_rxd, .gps_pps,
    .now(srv_now), .cfg_done(srv_cfg_done), .synced(srv_synced), .last_offset(srv_offset),
    .stepped(srv_stepped), .ntp_served(srv_ntp_served), .ntp_dropped(srv_ntp_dropped),
    .gps_good(srv_gps_good), .gps_bad(srv_gps_bad)
  );

  sntp_client #(.CLK_HZ(CLK_HZ), .MAC_ADDR(CLI_MAC)) u_client (
    .clk(cli_clk), .rst_n(cli_rst_n),
    .rx_data(cli_rx_data), .rx_valid(cli_rx_valid), .rx_last(cli_rx_last),
    .tx_data(cli_tx_data), .tx_valid(cli_tx_valid), .tx_last(cli_tx_last), .tx_ready(cli_tx_ready),
    .txd(cli_txd), .pps_out(cli_pps),
    .now(cli_now), .cfg_done(cli_cfg_done), .locked(cli_locked), .last_offset(cli_offset),
    .last_delay(cli_delay), .offset_valid(cli_offset_valid), .stepped(cli_stepped),
    .freq_corr(cli_freq_corr), .ntp_requests(cli_ntp_requests), .ntp_replies(cli_ntp_replies),
    .rmc_sent(cli_rmc_sent)
  );

endmodule
