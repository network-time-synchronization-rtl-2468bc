// time_rx: time reception module of the server.
//
// Turns the GPS receiver's outputs into a time reference for the
// synchronization module. The PPS input is synchronised and its rising edge
// latches the local time (pps_local), less the two cycles of synchroniser
// delay (2 * 2^22 / CLK_HZ). NMEA-0183 RMC sentences arriving from
// the UART are parsed character by character:
//   $xxRMC,hhmmss[.ss],A,lat,N,lon,E,spd,crs,ddmmyy,...*CS<CR><LF>
// The XOR checksum between '$' and '*' must match CS, the talker's sentence
// name must be RMC and the status field must be 'A' (valid fix).
// The UTC date and time are then converted to NTP seconds (seconds since
// 1900-01-01) by a small sequential unit that sums the lengths of the years
// since 1900 and of the months of the current year (one cycle per year or
// month, about 140 cycles), then adds days*86400 + h*3600 + m*60 + s.
//
// The RMC sentence is taken to describe the second that started at the last
// PPS edge. If that edge is less than one second (CLK_HZ cycles) old,
// ref_valid pulses for one cycle with ref_time = {seconds, 22'b0} and
// pps_local; the offset of the local clock is ref_time - pps_local.
// Years are read as 20yy (2000..2099).
//
// From the source design: the module's role (RMC frames and PPS from a GPS
// receiver to local NTP time). The parser and converter in plain logic, in
// place of a format converter plus small soft processor, are this design's.
module time_rx
  import sntp_pkg::*;
#(
  parameter int unsigned CLK_HZ = 50_000_000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  ts_t         now,
  input  logic        pps_in,
  input  logic [7:0]  rx_data,
  input  logic        rx_valid,
  output logic        ref_valid,
  output ts_t         ref_time,
  output ts_t         pps_local,
  output logic [15:0] good_count,
  output logic [15:0] bad_count
);

  // ---------------- PPS capture ----------------
  // The edge is seen two cycles after the first clock edge that samples it;
  // those two cycles of local time are taken off the latched value.
  localparam ts_t PPS_LAT = ts_t'((64'd2 << FRAC_W) / 64'(CLK_HZ));

  logic [2:0]  pps_sync;
  logic        pps_seen;
  logic [31:0] pps_age;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pps_sync  <= '0;
      pps_seen  <= 1'b0;
      pps_age   <= '0;
      pps_local <= '0;
    end else begin
      pps_sync <= {pps_sync[1:0], pps_in};
      if (pps_sync[1] && !pps_sync[2]) begin
        pps_local <= now - PPS_LAT;
        pps_seen  <= 1'b1;
        pps_age   <= '0;
      end else if (pps_age != '1) begin
        pps_age <= pps_age + 32'd1;
      end
    end
  end

  // ---------------- sentence parser ----------------
  typedef enum logic [2:0] {P_IDLE, P_BODY, P_CS1, P_CS2, P_EOL, P_YEARS, P_MONTHS, P_SUM} pstate_e;
  pstate_e st;

  logic [7:0]  cs_calc, cs_rx;
  logic [3:0]  field;
  logic [3:0]  pos;
  logic        name_ok, status_ok, digits_ok;
  logic [3:0]  tdig [6];
  logic [3:0]  ddig [6];
  logic        is_digit, is_hex;
  logic [3:0]  hexval;

  assign is_digit = (rx_data >= 8'h30) && (rx_data <= 8'h39);
  always_comb begin
    is_hex = 1'b1;
    hexval = rx_data[3:0];
    if (is_digit)                                   hexval = rx_data[3:0];
    else if (rx_data >= 8'h41 && rx_data <= 8'h46)  hexval = rx_data[3:0] + 4'd9;
    else if (rx_data >= 8'h61 && rx_data <= 8'h66)  hexval = rx_data[3:0] + 4'd9;
    else                                            is_hex = 1'b0;
  end

  // conversion registers
  logic [11:0] year, yiter;
  logic [3:0]  month, miter;
  logic [4:0]  mday;
  logic [16:0] days;
  logic [4:0]  hh;
  logic [5:0]  mi, ss;

  function automatic logic [6:0] dec2(logic [3:0] a, logic [3:0] b);
    return 7'(a) * 7'd10 + 7'(b);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= P_IDLE;
      cs_calc <= '0; cs_rx <= '0;
      field <= '0; pos <= '0;
      name_ok <= 1'b0; status_ok <= 1'b0; digits_ok <= 1'b0;
      for (int i = 0; i < 6; i++) begin tdig[i] <= '0; ddig[i] <= '0; end
      year <= '0; yiter <= '0; month <= '0; miter <= '0; mday <= '0;
      days <= '0; hh <= '0; mi <= '0; ss <= '0;
      ref_valid <= 1'b0; ref_time <= '0;
      good_count <= '0; bad_count <= '0;
    end else begin
      ref_valid <= 1'b0;
      if (rx_valid && rx_data == 8'h24 && st <= P_EOL) begin   // '$' restarts
        st <= P_BODY;
        cs_calc <= '0;
        field <= '0; pos <= '0;
        name_ok <= 1'b1; status_ok <= 1'b0; digits_ok <= 1'b1;
      end else begin
        unique case (st)
          P_IDLE: ;
          P_BODY: if (rx_valid) begin
            if (rx_data == 8'h2A) begin                         // '*'
              st <= P_CS1;
            end else if (rx_data < 8'h20 || rx_data > 8'h7E) begin
              st <= P_IDLE;
              bad_count <= bad_count + 16'd1;
            end else begin
              cs_calc <= cs_calc ^ rx_data;
              if (rx_data == 8'h2C) begin                       // ','
                field <= (field == 4'd15) ? field : field + 4'd1;
                pos   <= '0;
              end else begin
                pos <= (pos == 4'd15) ? pos : pos + 4'd1;
                case (field)
                  4'd0: begin
                    if (pos == 4'd2 && rx_data != 8'h52) name_ok <= 1'b0;  // R
                    if (pos == 4'd3 && rx_data != 8'h4D) name_ok <= 1'b0;  // M
                    if (pos == 4'd4 && rx_data != 8'h43) name_ok <= 1'b0;  // C
                  end
                  4'd1: if (pos < 4'd6) begin
                    tdig[pos[2:0]] <= rx_data[3:0];
                    if (!is_digit) digits_ok <= 1'b0;
                  end
                  4'd2: if (pos == 4'd0) status_ok <= (rx_data == 8'h41);  // A
                  4'd9: if (pos < 4'd6) begin
                    ddig[pos[2:0]] <= rx_data[3:0];
                    if (!is_digit) digits_ok <= 1'b0;
                  end
                  default: ;
                endcase
              end
            end
          end
          P_CS1: if (rx_valid) begin
            cs_rx[7:4] <= hexval;
            st <= is_hex ? P_CS2 : P_IDLE;
            if (!is_hex) bad_count <= bad_count + 16'd1;
          end
          P_CS2: if (rx_valid) begin
            cs_rx[3:0] <= hexval;
            st <= is_hex ? P_EOL : P_IDLE;
            if (!is_hex) bad_count <= bad_count + 16'd1;
          end
          P_EOL: if (rx_valid) begin
            if (name_ok && status_ok && digits_ok && field >= 4'd9 && cs_rx == cs_calc) begin
              hh    <= 5'(dec2(tdig[0], tdig[1]));
              mi    <= 6'(dec2(tdig[2], tdig[3]));
              ss    <= 6'(dec2(tdig[4], tdig[5]));
              mday  <= 5'(dec2(ddig[0], ddig[1]));
              month <= 4'(dec2(ddig[2], ddig[3]));
              year  <= 12'd2000 + 12'(dec2(ddig[4], ddig[5]));
              yiter <= 12'd1900;
              days  <= '0;
              st    <= P_YEARS;
            end else begin
              st <= P_IDLE;
              bad_count <= bad_count + 16'd1;
            end
          end
          P_YEARS: begin
            if (yiter == year) begin
              miter <= 4'd1;
              st    <= P_MONTHS;
            end else begin
              days  <= days + 17'(days_in_year(yiter));
              yiter <= yiter + 12'd1;
            end
          end
          P_MONTHS: begin
            if (miter >= month) begin
              days <= days + 17'(mday) - 17'd1;
              st   <= P_SUM;
            end else begin
              days  <= days + 17'(days_in_month(miter, is_leap(year)));
              miter <= miter + 4'd1;
            end
          end
          P_SUM: begin
            st <= P_IDLE;
            good_count <= good_count + 16'd1;
            ref_time <= {32'(days) * 32'd86400 + 32'(hh) * 32'd3600
                         + 32'(mi) * 32'd60 + 32'(ss), 22'b0};
            ref_valid <= pps_seen && (pps_age < 32'(CLK_HZ));
          end
          default: st <= P_IDLE;
        endcase
      end
    end
  end

endmodule
