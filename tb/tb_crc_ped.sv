// tb_crc_ped: checks the positive-edge detector.
//
// With the defaults (15 ps gates, 3-inverter pulse width, 5-inverter fixed
// delay, 118 ps matching delay) a rising edge of the feedback clock must give
// a 45 ps pulse on clk0 and p0 after (5+3)*15 = 120 ps, and a rising edge of
// din the same pulse after 238 ps. Falling edges give nothing, and edges of
// both inputs that coincide at the merging gate give one pulse.
module tb_crc_ped;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned T_INV = 15, N_PW = 3, N_FIXED = 5, MATCH = 118;
  localparam longint D_FB  = (N_FIXED + 3) * T_INV;
  localparam longint D_DIN = D_FB + MATCH;
  localparam longint W     = N_PW * T_INV;

  logic   din, fb_clk, clk0, p0;
  int     checks = 0, failures = 0;
  int     n_pulses;
  longint last_rise, last_width;

  crc_ped dut (.din(din), .fb_clk(fb_clk), .clk0(clk0), .p0(p0));

  always @(posedge p0) begin
    n_pulses++;
    last_rise = $time;
  end
  always @(negedge p0) last_width = $time - last_rise;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Apply one stimulus edge at time 0 of a 2 ns window and check the result.
  task automatic edge_case(input bit use_din, input bit use_fb, input bit rising,
                           input int exp_pulses, input longint exp_delay, input string name);
    longint t0;
    n_pulses = 0;
    t0 = $time;
    if (use_din) din = rising;
    if (use_fb) fb_clk = rising;
    #2000;
    check(n_pulses == exp_pulses, $sformatf("%s: %0d pulses", name, n_pulses));
    if (exp_pulses == 1) begin
      check(last_rise - t0 == exp_delay,
            $sformatf("%s: delay %0d, expected %0d", name, last_rise - t0, exp_delay));
      check(last_width == W, $sformatf("%s: width %0d", name, last_width));
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
    din = 1'b0;
    fb_clk = 1'b0;
    #3000;
    check(p0 == 1'b0 && clk0 == 1'b0, "idle outputs low");
    edge_case(0, 1, 1, 1, D_FB,  "feedback rising");
    edge_case(0, 1, 0, 0, 0,     "feedback falling");
    edge_case(1, 0, 1, 1, D_DIN, "data rising");
    edge_case(1, 0, 0, 0, 0,     "data falling");
    // Data edge and feedback edge aligned at the merging gate: one pulse.
    n_pulses = 0;
    din = 1'b1;
    #(MATCH);
    fb_clk = 1'b1;
    #2000;
    check(n_pulses == 1, $sformatf("aligned edges merge: %0d pulses", n_pulses));
    check(clk0 == p0, "clk0 and p0 are replicas");
    din = 1'b0;
    fb_clk = 1'b0;
    #2000;
    // Feedback clock as a 500 ps pulse train: one pulse per period.
    n_pulses = 0;
    repeat (6) begin
      fb_clk = 1'b1;
      #100;
      fb_clk = 1'b0;
      #400;
    end
    #1000;
    check(n_pulses == 6, $sformatf("pulse train: %0d pulses", n_pulses));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
