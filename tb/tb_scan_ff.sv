// Self-checking testbench of the unit scan flip-flop: random SE/SI/DI values,
// the flop output is compared after every rising clock edge with the input
// the multiplexer should have selected (SI when SE = 1, DI when SE = 0).
`timescale 1ns/1ps
module tb_scan_ff;
  logic clk = 1'b0;
  logic se, si, di, q;
  int   checks = 0, failures = 0;

  scan_ff dut (.clk(clk), .se(se), .si(si), .di(di), .q(q));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    int n_si = 0, n_di = 0;
    se = 1'b0; si = 1'b0; di = 1'b0;
    @(negedge clk);
    for (int i = 0; i < 400; i++) begin
      se = 1'($urandom);
      si = 1'($urandom);
      di = 1'($urandom);
      exp = se ? si : di;
      if (se) n_si++; else n_di++;
      @(posedge clk); #1;
      checks++;
      if (q !== exp) begin
        failures++;
        $display("FAIL step %0d se=%b si=%b di=%b q=%b exp=%b", i, se, si, di, q, exp);
      end
      @(negedge clk);
    end
    checks++;
    if (n_si == 0 || n_di == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
