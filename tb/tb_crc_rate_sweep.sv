// tb_crc_rate_sweep: the loop across bit cells from 0.40 to 1.00 ns.
//
// Thirteen copies of the circuit run side by side, one per bit cell in 50 ps
// steps. As the circuit intends, only the fixed delay of the positive-edge
// detector differs between them: N_FIXED is the odd inverter count that puts
// the captured tap near the same place in the delay line for every rate,
//   N_FIXED = max(1, odd((cell - 383 ps) / 15 ps - 3)).
// Each copy receives 126 random bits after a short preamble, limited to runs
// of at most two equal bits. The loop re-times its phase only at data edges,
// so between edges a period error accumulates; a line code that bounds the
// run length bounds that drift, and this test assumes such a code.
//
// The loop's period moves in 15 ps steps (half a tap): a cell whose captured
// position E = cell + 90 - MATCH_DLY - (N_FIXED + 3) * 15 ps lies within
// 3 ps of a step boundary (E mod 15 near 0) flips between the two neighbouring
// settings, and the drift then makes it drop lock now and then. Such cells
// are reported as marginal and only required to produce a clock; the others
// must meet every check. Checked per rate: the average clock
// period is within AVG_TOL_PCT of the bit cell, every single period is within
// 30 ps of it, and every rising data edge finds a clock edge at the loop's
// fixed phase. The average periods and errors are printed as a table.
module tb_crc_rate_sweep;
  timeunit 1ps;
  timeprecision 1ps;
  import crc_pkg::*;

  localparam int     N_RATES     = 13;
  localparam longint MATCH       = 118;
  localparam real    AVG_TOL_PCT = 2.0;

  function automatic int unsigned fixed_for(input int cell_ps);
    int n;
    // Nearest odd integer to (cell - 383) / 15 - 3.
    n = 2 * (((cell_ps - 383) * 2 - 4 * 15 + 30) / 60) + 1 - 2;
    if (n < 1) n = 1;
    return unsigned'(n);
  endfunction

  function automatic bit marginal(input int cell_ps);
    int e, r;
    e = cell_ps + 90 - int'(MATCH) - (int'(fixed_for(cell_ps)) + 3) * 15;
    r = e % 15;
    return (r < 3) || (r > 12);
  endfunction

  int checks = 0, failures = 0;
  int done = 0;
  int n_marginal = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  for (genvar r = 0; r < N_RATES; r++) begin : g_rate
    localparam int CELL = 400 + 50 * r;

    logic          rst_n, din, clk_out, p0, t, tb;
    logic [18:1]   sel;
    level_t        clkfb;
    bit            meas = 0;
    longint        last_clk = -1, last_rise = -1;
    longint        sum_per = 0, n_per = 0, max_err = 0;
    int            n_rises = 0, n_aligned = 0;

    crc_top #(.N_FIXED(fixed_for(CELL))) dut (
      .rst_n(rst_n), .din(din), .clk_out(clk_out), .p0(p0), .t(t), .tb(tb),
      .sel(sel), .clkfb(clkfb));

    always @(posedge clk_out) begin
      if (meas && last_clk >= 0) begin
        automatic longint per = $time - last_clk;
        automatic longint err = (per > CELL) ? per - CELL : CELL - per;
        sum_per += per;
        n_per++;
        if (err > max_err) max_err = err;
      end
      if (meas && last_rise >= 0 && $time - last_rise >= MATCH - 30 && $time - last_rise <= MATCH + 30)
        n_aligned++;
      last_clk = $time;
    end

    always @(posedge din) begin
      if (meas) n_rises++;
      last_rise = $time;
    end

    initial begin
      bit  b, prev = 1'b0;
      int  run = 0;
      real avg, err_pct;
      rst_n = 1'b0;
      din = 1'b0;
      #2000;
      rst_n = 1'b1;
      #1000;
      din = 1; #(CELL); din = 0; #(CELL); din = 1; #(CELL); din = 0; #(CELL);
      meas = 1;
      repeat (126) begin
        b = 1'($urandom);
        if (b == prev) run++; else run = 1;
        if (run > 2) begin
          b = ~b;
          run = 1;
        end
        prev = b;
        din = b;
        #(CELL);
      end
      meas = 0;
      avg = real'(sum_per) / real'(n_per);
      err_pct = 100.0 * (avg - real'(CELL)) / real'(CELL);
      if (err_pct < 0.0) err_pct = -err_pct;
      $display("cell %0d ps  N_FIXED %0d  average period %0.1f ps  error %0.2f %%  worst period error %0d ps%s",
               CELL, fixed_for(CELL), avg, err_pct, max_err, marginal(CELL) ? "  (marginal)" : "");
      if (marginal(CELL)) begin
        n_marginal++;
        check(n_per > 63, $sformatf("cell %0d: clock present (%0d periods)", CELL, n_per));
      end else begin
        check(err_pct <= AVG_TOL_PCT, $sformatf("cell %0d: average period error %0.2f %%", CELL, err_pct));
        check(max_err <= 30, $sformatf("cell %0d: worst period error %0d", CELL, max_err));
        check(n_rises > 20 && n_aligned == n_rises,
              $sformatf("cell %0d: %0d of %0d rising edges at the loop phase", CELL, n_aligned, n_rises));
      end
      done++;
    end
  end

  initial begin
    wait (done == N_RATES);
    check(n_marginal <= N_RATES / 3, $sformatf("%0d marginal cells", n_marginal));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
