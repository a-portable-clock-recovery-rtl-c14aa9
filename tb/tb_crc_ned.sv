// tb_crc_ned: checks the negative-edge detector.
//
// With 15 ps gates and a 3-inverter width, a falling data edge must give t
// high from 45 to 90 ps and tb low from 60 to 105 ps after the edge; a rising
// edge must give nothing. Pulses are counted over a data pattern.
module tb_crc_ned;
  timeunit 1ps;
  timeprecision 1ps;

  logic   din, t, tb;
  int     checks = 0, failures = 0;
  int     n_t, n_tb;
  longint t_rise, t_fall, tb_fall, tb_rise;

  crc_ned dut (.din(din), .t(t), .tb(tb));

  always @(posedge t)  begin n_t++;  t_rise  = $time; end
  always @(negedge t)  t_fall  = $time;
  always @(negedge tb) begin n_tb++; tb_fall = $time; end
  always @(posedge tb) tb_rise = $time;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #40000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t0;
    bit [9:0] pattern = 10'b1011001110;
    int falls = 0;
    din = 1'b1;
    #2000;
    check(t == 1'b0 && tb == 1'b1, "idle: t low, tb high");
    n_t = 0; n_tb = 0;
    t0 = $time;
    din = 1'b0;
    #1000;
    check(n_t == 1 && n_tb == 1, "one pulse pair per falling edge");
    check(t_rise - t0 == 45 && t_fall - t0 == 90,
          $sformatf("t window %0d..%0d", t_rise - t0, t_fall - t0));
    check(tb_fall - t0 == 60 && tb_rise - t0 == 105,
          $sformatf("tb window %0d..%0d", tb_fall - t0, tb_rise - t0));
    n_t = 0; n_tb = 0;
    din = 1'b1;
    #1000;
    check(n_t == 0 && n_tb == 0, "no pulse on a rising edge");
    // Pattern at 500 ps per bit: one pair per 1 -> 0 transition.
    n_t = 0; n_tb = 0;
    for (int i = 9; i >= 0; i--) begin
      if (din && !pattern[i]) falls++;
      din = pattern[i];
      #500;
    end
    #500;
    check(n_t == falls && n_tb == falls,
          $sformatf("pattern: %0d/%0d pulses for %0d falling edges", n_t, n_tb, falls));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
