// tb_crc_pccm: checks period capturing and clock muxing.
//
// The testbench plays the two delay lines itself. A capture window (t high,
// tb low) with the pulse at tap 5 must select tap 5 alone; a pulse on clock
// phase 5 must then drive the node to the 70 % threshold, while pulses on
// other phases leave it low. With the pulse spanning taps 4 and 5 both are
// selected: one phase high alone holds the node near half supply, and the
// node crosses 70 % between the times it would for either phase alone
// (interpolation). A later capture with no pulse in the line deselects all.
module tb_crc_pccm;
  timeunit 1ps;
  timeprecision 1ps;
  import crc_pkg::*;

  localparam int unsigned N = 10;
  localparam level_t VH = LEVEL_VH;

  logic          rst_n, t, tb;
  logic [N:1]    p, ck, sel;
  level_t        clkfb;
  int            checks = 0, failures = 0;

  crc_pccm #(.N_TAPS(N)) dut (.rst_n(rst_n), .t(t), .tb(tb), .p(p), .ck(ck), .sel(sel), .clkfb(clkfb));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic capture(input logic [N:1] taps);
    p = taps;
    #5;
    t = 1'b1; tb = 1'b0;
    #30;
    t = 1'b0; tb = 1'b1;
    #5;
    p = '0;
    #200;
  endtask

  // Launch a 45 ps pulse on the phases in 'first', another on 'second' after
  // 'gap' ps, and return when the node first reaches VH (-1 if never).
  task automatic fire(input logic [N:1] first, input logic [N:1] second,
                      input int gap, output int t_cross);
    longint t0;
    t_cross = -1;
    t0 = $time;
    fork
      begin
        ck = ck | first;
        #(gap);
        ck = ck | second;
        #(45 - gap);
        ck = ck & ~first;
        #(gap);
        ck = ck & ~second;
      end
      begin
        for (int i = 0; i < 300; i++) begin
          if (t_cross < 0 && clkfb >= VH) t_cross = int'($time - t0);
          #1;
        end
      end
    join
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c_single4, c_single5, c_pair, c_other;
    rst_n = 1'b0; t = 1'b0; tb = 1'b1; p = '0; ck = '0;
    #100;
    check(sel == '0 && clkfb == '0, "reset clears selection and node");
    rst_n = 1'b1;
    #100;
    capture(10'b00000_10000);
    check(sel == 10'b00000_10000, $sformatf("single capture selects tap 5: %b", sel));
    fire(10'b00000_00100, '0, 0, c_other);
    check(c_other < 0 && clkfb < level_t'(LEVEL_FS / 10), "unselected phase leaves node low");
    fire(10'b00000_10000, '0, 0, c_single5);
    check(c_single5 > 0 && c_single5 < 30, $sformatf("selected phase crosses at %0d ps", c_single5));
    #300;
    check(clkfb < level_t'(LEVEL_FS / 20), "node returns low after the pulse");
    // Capture spanning two taps.
    capture(10'b00000_11000);
    check(sel == 10'b00000_11000, $sformatf("two-tap capture selects taps 4 and 5: %b", sel));
    // Phase 4 held high alone: node settles near half supply.
    ck[4] = 1'b1;
    #200;
    check(clkfb > level_t'(LEVEL_FS * 45 / 100) && clkfb < level_t'(LEVEL_FS * 55 / 100),
          $sformatf("one of two phases high gives half supply: %0d", clkfb));
    ck[5] = 1'b1;
    #200;
    check(clkfb > level_t'(LEVEL_FS * 95 / 100), "both phases high gives full supply");
    ck = '0;
    #300;
    // Interpolation: 4 leads 5 by 30 ps, as on the delay line.
    fire(10'b00000_01000, 10'b00000_10000, 30, c_pair);
    #300;
    capture(10'b00000_01000);
    fire(10'b00000_01000, '0, 0, c_single4);
    #300;
    check(c_pair > c_single4 && c_pair < c_single5 + 30,
          $sformatf("interpolated crossing %0d between %0d and %0d", c_pair, c_single4, c_single5 + 30));
    // A capture with no pulse in the line deselects every phase.
    capture('0);
    check(sel == '0, "empty capture deselects all");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
