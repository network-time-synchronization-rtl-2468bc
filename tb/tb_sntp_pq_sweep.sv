// tb_sntp_pq_sweep: the clock discipline loop for every combination of poll
// exponent p in {0, 2, 4, 6} and attenuation q in {0, 1, 2, 3}.
//
// For each (p, q) the synchronization module (at CLK_HZ = 1000, so a second
// is 1000 cycles) is reset, stepped onto true time by a first measurement,
// then given a phase error of X0 = 2000 x 238 ns (about 0.48 ms, below the
// step limit) and measured every 2^p seconds against true time (t1 = t4 =
// local time, t2 = t3 = true time, as the server does with GPS). Checked:
// each offset is true - local exactly (to one unit, the rounding of the
// measurement itself); the first offset is X0; no later measurement steps
// the clock;
// from the third poll on |offset| stays below X0 (the loop is underdamped
// for q > 0, so it may swing past zero), after 12 polls it is below X0/2;
// and, apart from steps, the clock always moves forward.
module tb_sntp_pq_sweep;
  import sntp_pkg::*;
  localparam int HZ = 1000;
  localparam longint X0 = 2000;

  logic clk = 0, rst_n = 0;
  logic [3:0] poll_exp = 0, q = 0;
  logic meas_valid = 0;
  ts_t t1 = 0, t2 = 0, t3 = 0, t4 = 0, now;
  logic sec_tick, offset_valid, stepped, locked;
  ofs_t offset, delay;
  logic signed [47:0] freq_corr, slew;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sntp_sync #(.CLK_HZ(HZ)) dut (
    .clk, .rst_n, .poll_exp, .q, .freq_trim(32'sd0), .meas_valid, .t1, .t2, .t3, .t4,
    .now, .sec_tick, .offset_valid, .offset, .delay, .stepped, .locked, .freq_corr, .slew);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // true time: counts exactly 2^22/HZ units per cycle from a base
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  ts_t base;
  function automatic ts_t true_now();
    return base + ts_t'((cyc * 4194304) / HZ);
  endfunction

  ts_t prev_now = 0;
  logic rst_d = 0;
  int n_backwards = 0;
  always @(posedge clk) begin
    if (rst_n && rst_d && !stepped && signed'(now - prev_now) <= 0) n_backwards++;
    prev_now <= now;
    rst_d <= rst_n;
  end

  longint abs_off, prev_abs, exp_off;
  int n_step;
  always @(posedge clk) if (rst_n && stepped) n_step++;

  task automatic measure(ts_t extra, output longint off);
    ts_t loc, tru;
    @(negedge clk);
    loc = now;
    tru = true_now() + extra;
    exp_off = longint'(signed'(tru - loc));
    t1 = loc; t4 = loc; t2 = tru; t3 = tru; meas_valid = 1;
    @(negedge clk);
    meas_valid = 0;
    while (!offset_valid) @(negedge clk);
    off = longint'(offset);
    repeat (4) @(negedge clk);
  endtask

  initial begin
    longint off;
    base = {32'hD3B5_3E00, 22'd0};
    for (int pi = 0; pi < 4; pi++) begin
      for (int qi = 0; qi < 4; qi++) begin
        longint bound;
        rst_n = 0;
        poll_exp = 4'(2 * pi);
        q = 4'(qi);
        n_step = 0;
        repeat (3) @(negedge clk);
        rst_n = 1;
        @(negedge clk);
        // first measurement steps onto true time less X0
        measure(-ts_t'(X0), off);
        check(n_step == 1, $sformatf("p=%0d q=%0d: first measurement steps", poll_exp, q));
        repeat (HZ << poll_exp) @(negedge clk);
        measure(0, off);
        check(off - X0 <= 1 && X0 - off <= 1, $sformatf("p=%0d q=%0d: first offset %0d, expected %0d", poll_exp, q, off, X0));
        prev_abs = off < 0 ? -off : off;
        for (int k = 0; k < 12; k++) begin
          repeat ((HZ << poll_exp) - 8) @(negedge clk);
          measure(0, off);
          check(off - exp_off <= 1 && exp_off - off <= 1, $sformatf("p=%0d q=%0d: offset %0d, true %0d", poll_exp, q, off, exp_off));
          abs_off = off < 0 ? -off : off;
          check(abs_off < X0 || (k < 2 && abs_off <= X0 + 2),
                $sformatf("p=%0d q=%0d poll %0d: |offset| %0d shrinks below X0", poll_exp, q, k, abs_off));
          prev_abs = abs_off;
        end
        bound = X0 / 2;
        check(prev_abs <= bound, $sformatf("p=%0d q=%0d: final |offset| %0d within %0d", poll_exp, q, prev_abs, bound));
        check(n_step == 1, $sformatf("p=%0d q=%0d: no later steps", poll_exp, q));
        $display("p=%0d q=%0d: final offset %0d, frequency correction %0d", poll_exp, q, prev_abs, freq_corr);
      end
    end
    check(n_backwards == 0, "clock never runs backwards");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
