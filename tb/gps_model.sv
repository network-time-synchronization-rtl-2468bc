// gps_model: behavioural model of a GPS receiver for the testbenches (not
// synthesizable). Every true second it raises PPS for PPS_NS, then, after
// DELAY_NS, sends an NMEA RMC sentence for that second on txd (8N1, BIT_NS
// per bit); DELAY_NS may be shorter or longer than the PPS pulse. The second that starts at simulation time FIRST_NS + k*SEC_NS is
// NTP second START + k; SEC_NS may be shortened to speed up simulation.
module gps_model #(
  parameter real         SEC_NS   = 1.0e9,
  parameter real         FIRST_NS = 1.0e6,
  parameter real         PPS_NS   = 1.0e8,
  parameter real         DELAY_NS = 1.0e7,
  parameter real         BIT_NS   = 208333.3,
  parameter int unsigned START    = 32'hD3B5_3E00
) (
  output logic pps,
  output logic txd
);
  import tb_net_pkg::*;

  int unsigned seconds_sent = 0;

  initial begin
    pps = 0;
    txd = 1;
    #(FIRST_NS);
    forever begin
      automatic real t0 = $realtime;
      automatic string s = rmc_at(START + seconds_sent);
      pps = 1;
      fork
        begin #(PPS_NS) pps = 0; end
      join_none
      #(DELAY_NS);
      for (int i = 0; i < s.len(); i++) begin
        automatic byte unsigned c = s[i];
        txd = 0; #(BIT_NS);
        for (int b = 0; b < 8; b++) begin txd = c[b]; #(BIT_NS); end
        txd = 1; #(BIT_NS);
      end
      seconds_sent++;
      #(SEC_NS - ($realtime - t0));
    end
  end
endmodule
