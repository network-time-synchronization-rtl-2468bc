// proto_rx: receive-side field extractor of the protocol interface.
//
// Frames arrive from the MAC as a byte stream (rx_valid per byte, rx_last on
// the final byte; destination MAC first, no preamble, no FCS). The local time
// is latched when the first byte arrives: this is the receive timestamp of
// the frame (T2 at the server, T4 at the client). A byte counter selects
// which captured field each byte belongs to, so no frame buffer is needed:
// Ethernet header, ARP body, IPv4 header (no options), UDP ports, the NTP
// header fields and the BOOTP fields. From byte 282 of a frame addressed to
// UDP port 68, the BOOTP vendor options are walked (code, length, data) and
// the subnet mask, the first NTP server and the clock options are captured.
// done pulses for one cycle after the byte with rx_last; in that cycle frm
// holds the fields of the complete frame (it is cleared when the next frame
// starts, so the controller latches what it needs on done).
module proto_rx
  import sntp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  ts_t        now,
  input  logic [7:0] rx_data,
  input  logic       rx_valid,
  input  logic       rx_last,
  output logic       done,
  output rx_frame_t  frm
);

  rx_frame_t   w;          // fields of the frame being received
  logic [10:0] idx;
  // option walker
  typedef enum logic [1:0] {O_CODE, O_LEN, O_DATA, O_STOP} ostate_e;
  ostate_e     ost;
  logic [7:0]  ocode, olen, opos;

  function automatic logic [31:0] sh32(logic [31:0] r, logic [7:0] b);
    return {r[23:0], b};
  endfunction
  function automatic logic [47:0] sh48(logic [47:0] r, logic [7:0] b);
    return {r[39:0], b};
  endfunction
  function automatic logic [63:0] sh64(logic [63:0] r, logic [7:0] b);
    return {r[55:0], b};
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w    <= '0;
      idx  <= '0;
      done <= 1'b0;
      ost  <= O_CODE;
      ocode <= '0; olen <= '0; opos <= '0;
    end else begin
      done <= 1'b0;
      if (rx_valid) begin
        idx <= (idx == '1) ? idx : idx + 11'd1;
        if (idx == 11'd0) begin
          w       <= '0;
          w.rx_ts <= now;
          ost     <= O_CODE;
        end
        // fixed-offset fields
        if (idx <= 11'd5)                     w.eth_dst  <= sh48((idx == 0) ? '0 : w.eth_dst, rx_data);
        if (idx >= 11'd6  && idx <= 11'd11)   w.eth_src  <= sh48(w.eth_src, rx_data);
        if (idx >= 11'd12 && idx <= 11'd13)   w.eth_type <= {w.eth_type[7:0], rx_data};
        // ARP
        if (idx >= 11'd20 && idx <= 11'd21)   w.arp_oper <= {w.arp_oper[7:0], rx_data};
        if (idx >= 11'd22 && idx <= 11'd27)   w.arp_sha  <= sh48(w.arp_sha, rx_data);
        if (idx >= 11'd28 && idx <= 11'd31)   w.arp_spa  <= sh32(w.arp_spa, rx_data);
        if (idx >= 11'd38 && idx <= 11'd41)   w.arp_tpa  <= sh32(w.arp_tpa, rx_data);
        // IPv4 / UDP
        if (idx == 11'd14)                    w.ip_vihl  <= rx_data;
        if (idx == 11'd23)                    w.ip_proto <= rx_data;
        if (idx >= 11'd26 && idx <= 11'd29)   w.ip_src   <= sh32(w.ip_src, rx_data);
        if (idx >= 11'd30 && idx <= 11'd33)   w.ip_dst   <= sh32(w.ip_dst, rx_data);
        if (idx >= 11'd34 && idx <= 11'd35)   w.udp_sport <= {w.udp_sport[7:0], rx_data};
        if (idx >= 11'd36 && idx <= 11'd37)   w.udp_dport <= {w.udp_dport[7:0], rx_data};
        // NTP header (UDP payload at 42)
        if (idx == 11'd42)                    w.ntp_b0   <= rx_data;
        if (idx == 11'd44)                    w.ntp_poll <= rx_data;
        if (idx >= 11'd66 && idx <= 11'd73)   w.ntp_org  <= sh64(w.ntp_org, rx_data);
        if (idx >= 11'd74 && idx <= 11'd81)   w.ntp_rcv  <= sh64(w.ntp_rcv, rx_data);
        if (idx >= 11'd82 && idx <= 11'd89)   w.ntp_xmt  <= sh64(w.ntp_xmt, rx_data);
        // BOOTP (UDP payload at 42)
        if (idx == 11'd42)                    w.bp_op     <= rx_data;
        if (idx >= 11'd46 && idx <= 11'd49)   w.bp_xid    <= sh32(w.bp_xid, rx_data);
        if (idx >= 11'd58 && idx <= 11'd61)   w.bp_yiaddr <= sh32(w.bp_yiaddr, rx_data);
        if (idx >= 11'd70 && idx <= 11'd75)   w.bp_chaddr <= sh48(w.bp_chaddr, rx_data);
        if (idx >= 11'd278 && idx <= 11'd281) w.bp_cookie <= sh32(w.bp_cookie, rx_data);
        // BOOTP vendor options
        if (idx >= 11'(OFF_BOOTP_OPT) && w.udp_dport == PORT_BOOTPC && w.bp_cookie == BOOTP_COOKIE) begin
          unique case (ost)
            O_CODE: begin
              ocode <= rx_data;
              if (rx_data == OPT_END)      ost <= O_STOP;
              else if (rx_data != OPT_PAD) ost <= O_LEN;
            end
            O_LEN: begin
              olen <= rx_data;
              opos <= '0;
              ost  <= (rx_data == 8'd0) ? O_CODE : O_DATA;
            end
            O_DATA: begin
              opos <= opos + 8'd1;
              if (opos + 8'd1 == olen) ost <= O_CODE;
              case (ocode)
                OPT_MASK: if (opos < 8'd4) begin
                  w.opt_mask <= sh32(w.opt_mask, rx_data);
                  if (opos == 8'd3) w.opt_mask_ok <= 1'b1;
                end
                OPT_NTP: if (opos < 8'd4) begin      // first server only
                  w.opt_ntp <= sh32(w.opt_ntp, rx_data);
                  if (opos == 8'd3) w.opt_ntp_ok <= 1'b1;
                end
                OPT_POLL: if (opos == 8'd0) begin
                  w.opt_poll <= rx_data; w.opt_poll_ok <= 1'b1;
                end
                OPT_Q: if (opos == 8'd0) begin
                  w.opt_q <= rx_data; w.opt_q_ok <= 1'b1;
                end
                OPT_BAUD: if (opos < 8'd2) begin
                  w.opt_baud <= {w.opt_baud[7:0], rx_data};
                  if (opos == 8'd1) w.opt_baud_ok <= 1'b1;
                end
                OPT_TRIM: if (opos < 8'd4) begin
                  w.opt_trim <= sh32(w.opt_trim, rx_data);
                  if (opos == 8'd3) w.opt_trim_ok <= 1'b1;
                end
                default: ;
              endcase
            end
            O_STOP: ;
          endcase
        end
        if (rx_last) begin
          done  <= 1'b1;
          idx   <= '0;
          w.len <= idx + 11'd1;
        end
      end
    end
  end

  // w holds the complete frame in the cycle in which done is high
  assign frm = w;

endmodule
