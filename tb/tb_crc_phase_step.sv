// tb_crc_phase_step: recovery from data phase steps of 50 to 450 ps.
//
// Nine copies of the circuit at default sizes run side by side at a 500 ps
// bit cell. Each is locked with an alternating pattern, then its data is
// delayed by a different step (50, 100, ... 450 ps; 250 ps is half a cell)
// and the alternating pattern continues. A copy has recovered once four
// consecutive rising data edges each find a clock edge at the loop's fixed
// phase (about MATCH_DLY after the edge). Each copy must recover within six
// rising edges of the step, and afterwards every clock period must be within
// 25 ps of the cell and there must be exactly one clock edge per bit.
module tb_crc_phase_step;
  timeunit 1ps;
  timeprecision 1ps;
  import crc_pkg::*;

  localparam int     N_STEPS = 9;
  localparam longint CELL    = 500;
  localparam longint MATCH   = 118;
  localparam longint TOL_PH  = 30;
  localparam longint TOL_P   = 25;

  int checks = 0, failures = 0;
  int done = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  for (genvar s = 0; s < N_STEPS; s++) begin : g_step
    localparam longint STEP = 50 * (s + 1);

    logic          rst_n, din, clk_out, p0, t, tb;
    logic [18:1]   sel;
    level_t        clkfb;
    longint        last_rise = -1, last_clk = -1;
    bit            aligned;
    bit            per_chk = 0;
    int            n_clk;

    crc_top dut (.rst_n(rst_n), .din(din), .clk_out(clk_out), .p0(p0), .t(t), .tb(tb),
                 .sel(sel), .clkfb(clkfb));

    always @(posedge clk_out) begin
      if (last_rise >= 0 && $time - last_rise >= MATCH - TOL_PH && $time - last_rise <= MATCH + TOL_PH)
        aligned = 1'b1;
      if (per_chk && last_clk >= 0)
        check($time - last_clk >= CELL - TOL_P && $time - last_clk <= CELL + TOL_P,
              $sformatf("step %0d: period %0d after recovery", STEP, $time - last_clk));
      n_clk++;
      last_clk = $time;
    end

    initial begin
      automatic int edges = 0, run = 0;
      automatic bit ok = 0;
      rst_n = 1'b0;
      din = 1'b0;
      #2000;
      rst_n = 1'b1;
      #1000;
      repeat (6) begin din = 1; #(CELL); din = 0; #(CELL); end
      #(STEP);
      // Alternating data after the step; count consecutive aligned edges.
      while (!ok && edges < 9) begin
        aligned = 1'b0;
        din = 1;
        last_rise = $time;
        #(CELL);
        din = 0;
        #(CELL);
        edges++;
        run = aligned ? run + 1 : 0;
        ok = (run >= 4);
      end
      check(ok && edges - 4 < 6,
            $sformatf("step %0d ps: recovered=%0b after %0d rising edges", STEP, ok, edges - 4));
      $display("step %0d ps: in phase again from rising edge %0d after the step", STEP, edges - 3);
      // After recovery: period and one clock edge per bit.
      per_chk = 1;
      n_clk = 0;
      repeat (6) begin din = 1; #(CELL); din = 0; #(CELL); end
      per_chk = 0;
      check(n_clk == 12, $sformatf("step %0d: %0d clock edges in 12 bits", STEP, n_clk));
      done++;
    end
  end

  initial begin
    wait (done == N_STEPS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
