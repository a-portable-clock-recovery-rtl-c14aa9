// tb_crc_schmitt: checks the Schmitt trigger's hysteresis and delay.
//
// The input level is swept up and down in steps. The output must go high
// 27 ps after the level reaches 70 % of the supply, stay high while the level
// falls through the band between the thresholds, and go low 27 ps after it
// reaches 20 %. Random levels are compared with a reference state.
module tb_crc_schmitt;
  timeunit 1ps;
  timeprecision 1ps;
  import crc_pkg::*;

  localparam int unsigned T_ST = 27;

  logic   rst_n, clk_out;
  level_t level;
  logic   ref_state;
  int     checks = 0, failures = 0;
  longint t_set;

  crc_schmitt dut (.rst_n(rst_n), .level(level), .clk_out(clk_out));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    level = LEVEL_FS;
    #100;
    check(clk_out == 1'b0, "reset forces low");
    rst_n = 1'b1;
    level = '0;
    #100;
    // Sweep up: below VH stays low.
    level = LEVEL_VH - 1;
    #100;
    check(clk_out == 1'b0, "just below VH stays low");
    level = LEVEL_VH;
    t_set = $time;
    @(posedge clk_out);
    check($time - t_set == T_ST, $sformatf("rising delay %0d", $time - t_set));
    // Down through the band: holds high.
    level = level_t'(LEVEL_FS / 2);
    #100;
    check(clk_out == 1'b1, "mid band holds high");
    level = LEVEL_VL + 1;
    #100;
    check(clk_out == 1'b1, "just above VL holds high");
    level = LEVEL_VL;
    t_set = $time;
    @(negedge clk_out);
    check($time - t_set == T_ST, $sformatf("falling delay %0d", $time - t_set));
    level = level_t'(LEVEL_FS / 2);
    #100;
    check(clk_out == 1'b0, "mid band holds low");
    // Random walk against a reference.
    ref_state = 1'b0;
    for (int i = 0; i < 300; i++) begin
      level = level_t'($urandom);
      if (level >= LEVEL_VH) ref_state = 1'b1;
      else if (level <= LEVEL_VL) ref_state = 1'b0;
      #50;
      check(clk_out == ref_state, $sformatf("random step %0d level %0d", i, level));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
