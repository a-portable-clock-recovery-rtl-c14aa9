// tb_crc_delay_line: checks the tapped inverter delay line.
//
// A 45 ps pulse is launched into a 10-tap line with 15 ps inverters. Tap i
// must rise 2*i*15 ps after the input and fall 45 ps later, and every tap must
// carry the input's polarity. A second, identical line driven by the same
// input checks that the two lines stay matched tap for tap.
module tb_crc_delay_line;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned N_TAPS = 10;
  localparam int unsigned T_INV  = 15;
  localparam int unsigned W      = 45;

  logic              in;
  logic [N_TAPS:1]   tap_a, tap_b;
  longint            rise_t [N_TAPS:1];
  longint            fall_t [N_TAPS:1];
  int                checks = 0, failures = 0;
  longint            t0;

  crc_delay_line #(.N_TAPS(N_TAPS), .T_INV(T_INV)) dut_a (.in(in), .tap(tap_a));
  crc_delay_line #(.N_TAPS(N_TAPS), .T_INV(T_INV)) dut_b (.in(in), .tap(tap_b));

  for (genvar i = 1; i <= N_TAPS; i++) begin : g_mon
    always @(posedge tap_a[i]) rise_t[i] = $time;
    always @(negedge tap_a[i]) fall_t[i] = $time;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #20000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in = 1'b0;
    #1000;
    check(tap_a == '0, "all taps low with a low input");
    t0 = $time;
    in = 1'b1;
    #(W);
    in = 1'b0;
    #1000;
    for (int i = 1; i <= N_TAPS; i++) begin
      check(rise_t[i] - t0 == longint'(2*i*T_INV),
            $sformatf("tap %0d rise at %0d, expected %0d", i, rise_t[i] - t0, 2*i*T_INV));
      check(fall_t[i] - rise_t[i] == longint'(W),
            $sformatf("tap %0d width %0d", i, fall_t[i] - rise_t[i]));
    end
    // Hold a level: every tap follows with the same polarity.
    in = 1'b1;
    #1000;
    check(tap_a == '1, "all taps high with a high input");
    // Sample mid-flight: exactly taps up to the wavefront are high.
    in = 1'b0;
    #(5*2*T_INV + 5);
    check(tap_a == {{(N_TAPS-5){1'b1}}, 5'b00000}, $sformatf("wavefront after 5 taps: %b", tap_a));
    check(tap_a == tap_b, "the two lines match");
    #1000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
