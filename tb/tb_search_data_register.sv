// Self-checking testbench of the search data register (16-stage scan chain
// with trigger latches). Per round: shift a random word in serially and check
// every stage; pulse trigger and check that the searchlines take the word;
// shift a second word and check that the searchlines hold; capture a random
// encoder value with SE = 1, check the stages (encoder bits in stages 0..3,
// alternating pattern above), then shift 16 times and check the serial
// output sequence. Also checks the latch clear. Each shift takes one clock.
`timescale 1ns/1ps
module tb_search_data_register;
  localparam int W = 16;
  localparam int E = 4;

  logic         clk = 1'b0;
  logic         se, sl_in, trigger, latch_rst, scan_out;
  logic [E-1:0] enc_in;
  logic [W-1:0] sl, chain_q;
  int           checks = 0, failures = 0;
  int           n_shift = 0, n_capture = 0, n_trigger = 0, n_clear = 0;

  search_data_register #(.WIDTH(W), .ENC_W(E)) dut (
    .clk(clk), .se(se), .sl_in(sl_in), .enc_in(enc_in), .trigger(trigger),
    .latch_rst(latch_rst), .sl(sl), .chain_q(chain_q), .scan_out(scan_out)
  );

  always #5 clk = ~clk;

  task automatic check(input logic [W-1:0] got, input logic [W-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  // Shift a word in, the bit for the last stage first.
  task automatic shift_in(input logic [W-1:0] w);
    se = 1'b0;
    for (int i = W - 1; i >= 0; i--) begin
      sl_in = w[i];
      @(posedge clk); #1;
      n_shift++;
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] w1, w2, exp_cap, serial, prev;
    logic [E-1:0] enc;
    se = 1'b0; sl_in = 1'b0; trigger = 1'b0; latch_rst = 1'b1; enc_in = '0;
    #2;
    check(sl, '0, "latch clear");
    n_clear++;
    latch_rst = 1'b0;
    prev = '0;
    @(negedge clk);
    for (int r = 0; r < 30; r++) begin
      w1 = W'($urandom);
      w2 = W'($urandom);
      shift_in(w1);
      check(chain_q, w1, "chain after shift");
      check(sl, prev, "latches hold before trigger");
      trigger = 1'b1; #2; trigger = 1'b0; #1;
      n_trigger++;
      check(sl, w1, "searchlines after trigger");
      prev = w1;
      shift_in(w2);
      check(chain_q, w2, "chain after second shift");
      check(sl, w1, "searchlines hold while shifting");
      // capture
      enc = E'($urandom);
      enc_in = enc;
      for (int i = 0; i < W; i++) exp_cap[i] = (i < E) ? enc[i] : 1'(i % 2);
      se = 1'b1;
      @(posedge clk); #1;
      n_capture++;
      se = 1'b0;
      check(chain_q, exp_cap, "parallel capture");
      // serial readout: scan_out shows stage W-1, then W-2, ...
      for (int i = W - 1; i >= 0; i--) begin
        serial[i] = scan_out;
        sl_in = 1'b0;
        @(posedge clk); #1;
        n_shift++;
      end
      check(serial, exp_cap, "serial readout");
      check(W'(serial[E-1:0]), W'(enc), "address bits read last");
    end
    latch_rst = 1'b1; #1;
    check(sl, '0, "latch clear after use");
    n_clear++;
    latch_rst = 1'b0;
    checks++;
    if (n_shift == 0 || n_capture == 0 || n_trigger == 0 || n_clear < 2) failures++;
    $display("shifts=%0d captures=%0d triggers=%0d clears=%0d", n_shift, n_capture, n_trigger, n_clear);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
