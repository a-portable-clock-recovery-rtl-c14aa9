// tb_crc_pff: checks the pulsed flip-flop.
//
// The flip-flop must follow d only while t is high and tb is low, hold in
// every other combination of t/tb, and clear on rst_n. Random d and window
// sequences are compared against a reference held in the testbench.
module tb_crc_pff;
  timeunit 1ps;
  timeprecision 1ps;

  logic rst_n, d, t, tb, q;
  logic ref_q;
  int   checks = 0, failures = 0;

  crc_pff dut (.rst_n(rst_n), .d(d), .t(t), .tb(tb), .q(q));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; d = 1'b1; t = 1'b1; tb = 1'b0;
    #10;
    check(q == 1'b0, "reset clears even with the window open");
    rst_n = 1'b1;
    t = 1'b0; tb = 1'b1;
    #10;
    check(q == 1'b0, "closed window after reset holds 0");
    ref_q = 1'b0;
    for (int i = 0; i < 200; i++) begin
      d  = 1'($urandom);
      t  = 1'($urandom);
      tb = 1'($urandom);
      #10;
      if (t && !tb) ref_q = d;
      check(q == ref_q, $sformatf("step %0d: d=%b t=%b tb=%b q=%b expected %b",
                                  i, d, t, tb, q, ref_q));
    end
    // A pulse that coincides with the window is kept after the window closes.
    t = 1'b0; tb = 1'b1; d = 1'b0;
    #10;
    t = 1'b1; tb = 1'b0;
    #5 d = 1'b1;
    #10 t = 1'b0; tb = 1'b1;
    #5 d = 1'b0;
    #10;
    check(q == 1'b1, "pulse coinciding with the window is latched");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
