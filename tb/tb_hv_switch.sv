// Self-checking testbench of the high voltage switch model: rails 7 V / 3.5 V
// / 0 V. Checks the settled levels for a '1' (7 V) and a '0' (0 V), the
// half-way points and the measured transition times: the output must reach
// the rail 210 ns after a rising input and 145 ns after a falling one (within
// two model steps), and must not be there earlier.
`timescale 1ns/1ps
module tb_hv_switch;
  logic vin;
  real  v_high, v_pp, v_low, vout;
  int   checks = 0, failures = 0;

  hv_switch dut (.vin(vin), .v_high(v_high), .v_pp(v_pp), .v_low(v_low), .vout(vout));

  task automatic check_v(input real exp, input real tol, input string what);
    checks++;
    if (vout < exp - tol || vout > exp + tol) begin
      failures++;
      $display("FAIL %s at %0t: vout=%0.3f exp=%0.3f", what, $time, vout, exp);
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
    realtime t0;
    v_high = 7.0; v_pp = 3.5; v_low = 0.0; vin = 1'b0;
    #500;
    check_v(0.0, 0.01, "settled low");
    for (int k = 0; k < 3; k++) begin
      // rising
      vin = 1'b1; t0 = $realtime;
      #105;
      check_v(3.5, 0.1, "half-way rise");
      wait (vout >= 7.0);
      checks++;
      if ($realtime - t0 < 208.0 || $realtime - t0 > 212.0) begin
        failures++;
        $display("FAIL rise time %0.1f ns", $realtime - t0);
      end
      #300;
      check_v(7.0, 0.01, "settled high");
      // falling
      vin = 1'b0; t0 = $realtime;
      #72.5;
      check_v(3.5, 0.1, "half-way fall");
      wait (vout <= 0.0);
      checks++;
      if ($realtime - t0 < 143.0 || $realtime - t0 > 147.0) begin
        failures++;
        $display("FAIL fall time %0.1f ns", $realtime - t0);
      end
      #300;
      check_v(0.0, 0.01, "settled low again");
    end
    // a raised low rail: a '0' is driven to v_low (0..1 V range)
    v_low = 1.0;
    #400;
    check_v(1.0, 0.01, "low rail 1 V");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
