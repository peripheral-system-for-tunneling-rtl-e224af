// Self-checking testbench of the matchline sense amplifier model. Runs the
// four-step sequence (RST, PCH, evaluation, LAT) for a matching line (no cell
// current) and for mismatching lines (one or more cells of 100 nA each) and
// checks the precharge level (1 V), the latched result (1 = match) and that
// the result holds until the next RST.
`timescale 1ns/1ps
module tb_ml_sense_amp;
  logic rst, pch, lat, mlso;
  real  ml_i, ml_v;
  int   checks = 0, failures = 0;
  int   n_match = 0, n_mismatch = 0;

  ml_sense_amp dut (.rst(rst), .pch(pch), .lat(lat), .ml_i(ml_i), .ml_v(ml_v), .mlso(mlso));

  task automatic check_bit(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %b exp %b (ml_v=%0.3f)", what, $time, got, exp, ml_v);
    end
  endtask

  // One search: current i on the line during evaluation.
  task automatic search(input real i, input logic exp);
    ml_i = i;
    rst = 1'b1; #50; rst = 1'b0; #10;
    check_bit(mlso, 1'b0, "cleared by RST");
    pch = 1'b1; #100;
    checks++;
    if (ml_v < 0.99 || ml_v > 1.01) begin
      failures++;
      $display("FAIL precharge level %0.3f", ml_v);
    end
    pch = 1'b0;
    #1000;
    check_bit(mlso, 1'b0, "no change before LAT");
    lat = 1'b1; #20; lat = 1'b0; #10;
    check_bit(mlso, exp, "latched result");
    #500;
    check_bit(mlso, exp, "result holds");
    if (exp) n_match++; else n_mismatch++;
  endtask

  initial begin : watchdog
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b0; pch = 1'b0; lat = 1'b0; ml_i = 0.0;
    #20;
    search(0.0, 1'b1);
    search(100.0e-9, 1'b0);
    search(0.0, 1'b1);
    search(300.0e-9, 1'b0);
    search(1.0e-9, 1'b1);     // leakage far below a mismatch current
    for (int k = 0; k < 10; k++) begin
      int n;
      n = $urandom_range(0, 4);
      search(real'(n) * 100.0e-9, (n == 0));
    end
    checks++;
    if (n_match == 0 || n_mismatch == 0) failures++;
    $display("matches=%0d mismatches=%0d", n_match, n_mismatch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
