// Self-checking testbench of the 16-to-4 priority encoder: all 65,536 input
// patterns are compared with a reference that scans for the highest set bit,
// then the three measured matchline patterns (ML2; ML11 and ML2; ML15, ML11
// and ML2) are checked against their expected addresses 2, 11 and 15.
`timescale 1ns/1ps
module tb_priority_encoder;
  logic [15:0] d;
  logic [3:0]  y;
  int          checks = 0, failures = 0;

  priority_encoder dut (.d(d), .y(y));

  function automatic logic [3:0] ref_enc(input logic [15:0] v);
    ref_enc = 4'd0;
    for (int i = 0; i < 16; i++) if (v[i]) ref_enc = 4'(i);
  endfunction

  task automatic check_case(input logic [15:0] v, input logic [3:0] exp);
    d = v;
    #1;
    checks++;
    if (y !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL d=%h y=%0d exp=%0d", v, y, exp);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) check_case(16'(v), ref_enc(16'(v)));
    check_case(16'h0004, 4'd2);    // ML<2>
    check_case(16'h0804, 4'd11);   // ML<11>, ML<2>
    check_case(16'h8804, 4'd15);   // ML<15>, ML<11>, ML<2>
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
