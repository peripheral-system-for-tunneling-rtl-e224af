// Self-checking testbench of the trigger latch: transparency while trigger
// is high, hold while it is low, and clear by rst (also with trigger high).
`timescale 1ns/1ps
module tb_scan_latch;
  logic rst, trigger, d, sl;
  int   checks = 0, failures = 0;

  scan_latch dut (.rst(rst), .trigger(trigger), .d(d), .sl(sl));

  task automatic expect_sl(input logic exp, input string what);
    #1;
    checks++;
    if (sl !== exp) begin
      failures++;
      $display("FAIL %s: sl=%b exp=%b", what, sl, exp);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic held;
    rst = 1'b1; trigger = 1'b0; d = 1'b1;
    expect_sl(1'b0, "reset");
    rst = 1'b0;
    expect_sl(1'b0, "hold after reset");
    trigger = 1'b1; d = 1'b1;
    expect_sl(1'b1, "transparent 1");
    d = 1'b0;
    expect_sl(1'b0, "transparent 0");
    for (int i = 0; i < 200; i++) begin
      d = 1'($urandom);
      trigger = 1'b1;
      expect_sl(d, "transparent random");
      held = d;
      trigger = 1'b0;
      #1;
      repeat (3) begin
        d = 1'($urandom);
        expect_sl(held, "hold random");
      end
    end
    d = 1'b1; trigger = 1'b1;
    expect_sl(1'b1, "set before clear");
    rst = 1'b1;
    expect_sl(1'b0, "clear while transparent");
    rst = 1'b0;
    expect_sl(1'b1, "transparent after clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
