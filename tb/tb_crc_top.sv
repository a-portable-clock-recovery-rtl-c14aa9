// tb_crc_top: end-to-end test of the clock recovery loop at default sizes.
//
// Runs the complete circuit (15 ps gates, 18-tap lines) through the cases
// the circuit is meant for, each started from reset:
//   1. Acquisition at 2 Gb/s with the data 1011111111: the first clock edge
//      must come within two data transitions, and during the run of ones the
//      loop must keep oscillating with a 500 ps period and little period
//      jitter (free running).
//   2. 6-bit pseudo-random data (x^6 + x^5 + 1), two full sequences: every
//      period stays near the bit cell and every rising data edge finds a
//      clock edge at the loop's fixed phase, about MATCH_DLY after it
//      (re-timing).
//   3. A half-bit-cell (250 ps) phase step in the data: the clock must be
//      back at the fixed phase of the new data within four rising edges.
//   4. Acquisition at 2.5 Gb/s (400 ps cell) with the same sizes.
//   5. A 515 ps cell, which falls between two taps: the capture must select
//      two neighbouring phases and the interpolated period must still match.
// Each mechanism (capture, free-running period, re-timing edge, two-phase
// interpolation, loop halt on an inconsistent capture, recovery) is counted
// and must occur at least once.
module tb_crc_top;
  timeunit 1ps;
  timeprecision 1ps;
  import crc_pkg::*;

  localparam int     N_TAPS  = 18;       // top default
  localparam longint MATCH   = 118;      // top default matching delay
  localparam longint TOL_P   = 25;       // per-period tolerance, ps
  localparam longint TOL_PH  = 30;       // phase tolerance, ps
  localparam longint JIT_MAX = 10;       // peak-to-peak period jitter, ps

  logic              rst_n, din;
  logic              clk_out, p0, t, tb;
  logic [N_TAPS:1]   sel;
  level_t            clkfb;

  crc_top dut (.rst_n(rst_n), .din(din), .clk_out(clk_out), .p0(p0), .t(t), .tb(tb),
               .sel(sel), .clkfb(clkfb));

  int     checks = 0, failures = 0;
  // Mechanism counters.
  int     n_capture, n_free_period, n_retime, n_interp, n_halt, n_recover;

  // Monitors.
  longint bit_ps = 500;
  bit     per_chk = 0;       // check every period against bit_ps
  bit     free_run = 0;      // data constant: count free-running periods
  longint last_clk = -1;
  longint last_rise = -1;
  longint per_min, per_max;
  int     n_clk, n_aligned, n_rises;
  int     n_trans;
  int     first_trans;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  always @(posedge clk_out) begin
    if (n_clk == 0) first_trans = n_trans;
    n_clk++;
    if (last_clk >= 0 && per_chk) begin
      automatic longint per = $time - last_clk;
      check(per >= bit_ps - TOL_P && per <= bit_ps + TOL_P,
            $sformatf("period %0d, cell %0d", per, bit_ps));
      if (per < per_min) per_min = per;
      if (per > per_max) per_max = per;
      if (free_run) n_free_period++;
    end
    if (last_rise >= 0 && $time - last_rise >= MATCH - TOL_PH && $time - last_rise <= MATCH + TOL_PH)
      n_aligned++;
    last_clk = $time;
  end

  always @(din) n_trans++;
  always @(posedge din) begin
    n_rises++;
    last_rise = $time;
  end

  // Count captures and classify the selection they leave.
  always @(negedge t) begin
    #1;
    n_capture++;
    if ($countones(sel) == 2 && ((sel & (sel >> 1)) != '0)) n_interp++;
    if ($countones(sel) >= 2 && ((sel & ~((sel << 1) | (sel >> 1))) != '0)) n_halt++;
  end

  task automatic do_reset();
    din = 1'b0;
    rst_n = 1'b0;
    per_chk = 0;
    free_run = 0;
    #2000;
    rst_n = 1'b1;
    last_clk = -1;
    last_rise = -1;
    #1000;
  endtask

  task automatic send(input bit b);
    din = b;
    #(bit_ps);
  endtask

  task automatic start_stats();
    per_min = 64'd1_000_000;
    per_max = 0;
    n_aligned = 0;
    n_rises = 0;
  endtask

  initial begin
    #400000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit [5:0] lfsr;

    // 1. Acquisition, 1011111111 at 500 ps.
    bit_ps = 500;
    do_reset();
    n_clk = 0;
    n_trans = 0;
    send(1); send(0);
    repeat (8) send(1);
    check(n_clk > 0 && first_trans <= 2,
          $sformatf("first clock edge after %0d data transitions", first_trans));
    // The run of ones: the clock free-runs; check periods after the first edges.
    per_chk = 1;
    free_run = 1;
    start_stats();
    repeat (8) send(1);
    free_run = 0;
    check(per_max - per_min <= JIT_MAX,
          $sformatf("free-running period spread %0d..%0d", per_min, per_max));
    check(n_free_period >= 6, $sformatf("free-running periods %0d", n_free_period));
    per_chk = 0;

    // 2. Pseudo-random data, 2 x 63 bits.
    bit_ps = 500;
    do_reset();
    send(1); send(0); send(1); send(0); send(1);
    per_chk = 1;
    start_stats();
    lfsr = 6'h3f;
    repeat (126) begin
      send(lfsr[5]);
      lfsr = {lfsr[4:0], lfsr[5] ^ lfsr[4]};
    end
    per_chk = 0;
    check(n_rises > 20, $sformatf("pseudo-random rising edges %0d", n_rises));
    check(n_aligned == n_rises,
          $sformatf("pseudo-random: %0d of %0d rising edges found a clock edge at the loop phase",
                    n_aligned, n_rises));
    n_retime += n_aligned;
    check(per_max - per_min <= 2 * JIT_MAX,
          $sformatf("pseudo-random period spread %0d..%0d", per_min, per_max));

    // 3. Half-cell phase step.
    bit_ps = 500;
    do_reset();
    repeat (6) begin send(1); send(0); end
    #250;
    begin
      int k;
      bit recovered = 0;
      for (k = 0; k < 4 && !recovered; k++) begin
        start_stats();
        send(1); send(0);
        if (n_aligned == 1) begin
          // Needs to hold for the following bits too.
          start_stats();
          repeat (4) begin send(1); send(0); end
          recovered = (n_aligned == 4);
        end
      end
      check(recovered, "clock recovered the data phase after a half-cell step");
      if (recovered) n_recover++;
      // Once recovered, the period is right again.
      per_chk = 1;
      repeat (4) begin send(1); send(0); end
      per_chk = 0;
    end

    // 4. 2.5 Gb/s.
    bit_ps = 400;
    do_reset();
    send(1); send(0); send(1); send(0); send(1);
    per_chk = 1;
    start_stats();
    repeat (10) begin send(1); send(1); send(0); end
    per_chk = 0;
    check(n_aligned == n_rises, $sformatf("400 ps cell: %0d of %0d edges at the loop phase",
                                          n_aligned, n_rises));

    // 5. 515 ps cell between two taps.
    bit_ps = 515;
    do_reset();
    send(1); send(0); send(1); send(0); send(1);
    check($countones(sel) == 2 && (sel & (sel >> 1)) != '0,
          $sformatf("515 ps cell selects two neighbouring phases: %b", sel));
    per_chk = 1;
    start_stats();
    repeat (10) begin send(1); send(0); end
    per_chk = 0;

    check(n_capture > 0, "captures happened");
    check(n_free_period > 0, "free-running periods happened");
    check(n_retime > 0, "re-timing edges happened");
    check(n_interp > 0, "two-phase interpolation happened");
    check(n_halt > 0, "loop halt on an inconsistent capture happened");
    check(n_recover > 0, "phase recovery happened");
    $display("mechanisms: capture=%0d free_period=%0d retime=%0d interp=%0d halt=%0d recover=%0d",
             n_capture, n_free_period, n_retime, n_interp, n_halt, n_recover);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
