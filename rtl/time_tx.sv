// time_tx: time transmission module of the client.
//
// Makes the client look like a GPS receiver to the attached equipment. At
// every rollover of the local clock's seconds field (sec_tick) it raises the
// PPS output for PPS_WIDTH cycles, then converts the new second (NTP seconds
// since 1900) to a UTC date and time and sends an NMEA-0183 RMC sentence
// through the UART:
//   $GPRMC,hhmmss.00,S,,,,,,,ddmmyy,,,A*CS<CR><LF>
// S is 'A' while time_ok is high and 'V' otherwise; position, speed and
// course are left empty since the client has no position fix.
//
// Conversion: a sequential divider computes seconds/86400 (day count and
// second of day), then /3600 and /60 (hours, minutes, seconds), 33 cycles
// each. The day count is turned into year, month and day by subtracting year
// lengths from 1900 and then month lengths, one cycle per step. The sentence
// (40 characters) is then handed to the UART byte by byte with a
// valid/ready handshake while the XOR checksum is accumulated. A tick that
// arrives while a sentence is still being sent gets a PPS pulse only.
//
// From the source design: the role of the module (local NTP time to RMC
// frames and PPS for the equipment) and the use of a divider. The field
// layout, the PPS width and the plain-logic sequencer (rather than a small
// soft processor) are this design's. The year is printed modulo 100.
module time_tx
  import sntp_pkg::*;
#(
  parameter int unsigned CLK_HZ    = 50_000_000,
  parameter int unsigned PPS_WIDTH = CLK_HZ / 10
) (
  input  logic       clk,
  input  logic       rst_n,
  input  ts_t        now,
  input  logic       sec_tick,
  input  logic       time_ok,
  output logic       pps_out,
  output logic [7:0] tx_data,
  output logic       tx_valid,
  input  logic       tx_ready,
  output logic [15:0] sent_count
);

  localparam int unsigned NCHARS = 40;

  // ---------------- PPS ----------------
  logic [31:0] pps_cnt;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pps_cnt <= '0;
      pps_out <= 1'b0;
    end else if (sec_tick) begin
      pps_cnt <= 32'(PPS_WIDTH) - 32'd1;
      pps_out <= 1'b1;
    end else if (pps_cnt != '0) begin
      pps_cnt <= pps_cnt - 32'd1;
    end else begin
      pps_out <= 1'b0;
    end
  end

  // ---------------- conversion ----------------
  typedef enum logic [2:0] {S_IDLE, S_DIV_DAY, S_DIV_HR, S_DIV_MIN, S_YEARS, S_MONTHS, S_EMIT} state_e;
  state_e st;

  logic        div_start, div_done, div_busy;
  logic [31:0] div_a, div_b, div_q, div_r;

  seq_div #(.W(32)) u_div (
    .clk, .rst_n, .start(div_start), .dividend(div_a), .divisor(div_b),
    .busy(div_busy), .done(div_done), .quotient(div_q), .remainder(div_r)
  );

  logic [16:0] days;
  logic [11:0] year;
  logic [3:0]  month;
  logic [4:0]  hh;
  logic [5:0]  mi, ss;
  logic        status_a;
  logic [5:0]  idx;
  logic [7:0]  cs;

  // two decimal digits of v < 100: tens = (v*205) >> 11
  function automatic logic [15:0] two_dig(logic [6:0] v);
    logic [17:0] p;
    logic [3:0]  t, o;
    p = 18'(v) * 18'd205;
    t = p[14:11];
    o = 4'(v - 7'(t) * 7'd10);
    return {8'h30 + 8'(t), 8'h30 + 8'(o)};
  endfunction

  logic [15:0] d_hh, d_mi, d_ss, d_dd, d_mo, d_yy;
  assign d_hh = two_dig(7'(hh));
  assign d_mi = two_dig(7'(mi));
  assign d_ss = two_dig(7'(ss));
  assign d_dd = two_dig(7'(days) + 7'd1);
  assign d_mo = two_dig(7'(month));
  assign d_yy = two_dig(7'((year >= 12'd2000) ? year - 12'd2000 : year - 12'd1900));

  logic [7:0] ch;
  always_comb begin
    unique case (idx)
      6'd0:  ch = "$";
      6'd1:  ch = "G";
      6'd2:  ch = "P";
      6'd3:  ch = "R";
      6'd4:  ch = "M";
      6'd5:  ch = "C";
      6'd6:  ch = ",";
      6'd7:  ch = d_hh[15:8];
      6'd8:  ch = d_hh[7:0];
      6'd9:  ch = d_mi[15:8];
      6'd10: ch = d_mi[7:0];
      6'd11: ch = d_ss[15:8];
      6'd12: ch = d_ss[7:0];
      6'd13: ch = ".";
      6'd14, 6'd15: ch = "0";
      6'd16: ch = ",";
      6'd17: ch = status_a ? "A" : "V";
      6'd18, 6'd19, 6'd20, 6'd21, 6'd22, 6'd23, 6'd24: ch = ",";
      6'd25: ch = d_dd[15:8];
      6'd26: ch = d_dd[7:0];
      6'd27: ch = d_mo[15:8];
      6'd28: ch = d_mo[7:0];
      6'd29: ch = d_yy[15:8];
      6'd30: ch = d_yy[7:0];
      6'd31, 6'd32, 6'd33: ch = ",";
      6'd34: ch = "A";
      6'd35: ch = "*";
      6'd36: ch = hex_char(cs[7:4]);
      6'd37: ch = hex_char(cs[3:0]);
      6'd38: ch = 8'h0D;
      6'd39: ch = 8'h0A;
      default: ch = 8'h00;
    endcase
  end

  assign tx_data  = ch;
  assign tx_valid = (st == S_EMIT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE;
      div_start <= 1'b0; div_a <= '0; div_b <= '0;
      days <= '0; year <= '0; month <= '0; hh <= '0; mi <= '0; ss <= '0;
      status_a <= 1'b0; idx <= '0; cs <= '0; sent_count <= '0;
    end else begin
      div_start <= 1'b0;
      unique case (st)
        S_IDLE: if (sec_tick) begin
          div_a     <= now[TS_W-1 -: SEC_W];
          div_b     <= 32'd86400;
          div_start <= 1'b1;
          status_a  <= time_ok;
          st        <= S_DIV_DAY;
        end
        S_DIV_DAY: if (div_done) begin
          days      <= 17'(div_q);
          div_a     <= div_r;
          div_b     <= 32'd3600;
          div_start <= 1'b1;
          st        <= S_DIV_HR;
        end
        S_DIV_HR: if (div_done) begin
          hh        <= 5'(div_q);
          div_a     <= div_r;
          div_b     <= 32'd60;
          div_start <= 1'b1;
          st        <= S_DIV_MIN;
        end
        S_DIV_MIN: if (div_done) begin
          mi   <= 6'(div_q);
          ss   <= 6'(div_r);
          year <= 12'd1900;
          st   <= S_YEARS;
        end
        S_YEARS: begin
          if (days >= 17'(days_in_year(year))) begin
            days <= days - 17'(days_in_year(year));
            year <= year + 12'd1;
          end else begin
            month <= 4'd1;
            st    <= S_MONTHS;
          end
        end
        S_MONTHS: begin
          if (days >= 17'(days_in_month(month, is_leap(year)))) begin
            days  <= days - 17'(days_in_month(month, is_leap(year)));
            month <= month + 4'd1;
          end else begin
            idx <= '0;
            cs  <= '0;
            st  <= S_EMIT;
          end
        end
        S_EMIT: if (tx_ready) begin
          if (idx >= 6'd1 && idx <= 6'd34) cs <= cs ^ ch;
          if (idx == 6'(NCHARS - 1)) begin
            st <= S_IDLE;
            sent_count <= sent_count + 16'd1;
          end
          idx <= idx + 6'd1;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
