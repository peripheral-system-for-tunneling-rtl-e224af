// End-to-end testbench of the TFET CAM peripheral system with a behavioural
// 16 x 16 CAM array attached, all parameters at their defaults.
//
// Each search: load random words into the array (a random set of rows holds
// the search key, possibly none), shift the key into the scan chain, trigger
// the latches, check the searchline voltages (7 V / 0 V) and their settling
// times (210 ns rising, 145 ns falling), run RST / PCH / evaluate / LAT on the
// sense amplifiers, check every MLSA output and the encoder address against
// a reference, capture the address into the scan chain and shift it out.
// Three further searches reproduce the bench test in which chosen matchlines
// are held high regardless of the array: ML2; ML11 and ML2; ML15, ML11 and
// ML2, which must give addresses 2, 11 and 15. Every mechanism (serial shift,
// trigger, latch clear, SL rise and fall, match, mismatch, priority between
// several matches, no match, parallel capture, serial readout, forced
// matchlines) is counted and must occur at least once.
`timescale 1ns/1ps
module tb_cam_peripheral_top;
  import cam_periph_pkg::*;

  localparam real TCLK = 100.0;

  logic              clk = 1'b0;
  logic              se, sl_in, trigger, latch_rst, scan_out;
  logic              mlsa_rst, pch, lat;
  real               v_high, v_pp, v_low;
  real               sl_v [NUM_SL], slb_v [NUM_SL];
  real               ml_i [NUM_ML], ml_v [NUM_ML], arr_i [NUM_ML], force_i [NUM_ML];
  logic              force_ml;
  logic [NUM_SL-1:0] sl;
  logic [NUM_ML-1:0] mlso;
  ml_addr_t          addr;
  logic [NUM_SL-1:0] stored [NUM_ML];

  int checks = 0, failures = 0;
  int n_shift = 0, n_trigger = 0, n_clear = 0, n_rise = 0, n_fall = 0;
  int n_match = 0, n_mismatch = 0, n_multi = 0, n_nomatch = 0;
  int n_capture = 0, n_readout = 0, n_forced = 0;

  cam_peripheral_top dut (
    .clk(clk), .se(se), .sl_in(sl_in), .trigger(trigger), .latch_rst(latch_rst),
    .scan_out(scan_out), .mlsa_rst(mlsa_rst), .pch(pch), .lat(lat),
    .v_high(v_high), .v_pp(v_pp), .v_low(v_low),
    .sl_v(sl_v), .slb_v(slb_v), .ml_i(ml_i), .ml_v(ml_v),
    .sl(sl), .mlso(mlso), .addr(addr)
  );

  tfet_cam_array_model u_array (.stored(stored), .sl_v(sl_v), .slb_v(slb_v), .ml_i(arr_i));

  always_comb
    for (int r = 0; r < NUM_ML; r++) ml_i[r] = force_ml ? force_i[r] : arr_i[r];

  always #(TCLK / 2) clk = ~clk;

  task automatic fail(input string what);
    failures++;
    $display("FAIL at %0t: %s", $time, what);
  endtask

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) fail(what);
  endtask

  function automatic ml_addr_t ref_addr(input logic [NUM_ML-1:0] m);
    ref_addr = '0;
    for (int r = 0; r < NUM_ML; r++) if (m[r]) ref_addr = ml_addr_t'(r);
  endfunction

  // Shift the key in (bit for SL15 first), trigger the latches and check the
  // searchline voltages and their transition times.
  task automatic apply_key(input logic [NUM_SL-1:0] key);
    logic [NUM_SL-1:0] old;
    realtime t0, t_rise, t_fall;
    int c_rise, c_fall;
    old = sl;
    @(negedge clk);
    se = 1'b0;
    for (int i = NUM_SL - 1; i >= 0; i--) begin
      sl_in = key[i];
      @(negedge clk);
      n_shift++;
    end
    check(sl == old, "searchlines held while shifting");
    trigger = 1'b1; t0 = $realtime;
    #(TCLK / 4);
    trigger = 1'b0;
    n_trigger++;
    check(sl == key, "latched search data");
    // pick one rising and one falling searchline, if any, and time them
    c_rise = -1; c_fall = -1;
    for (int c = 0; c < NUM_SL; c++) begin
      if (key[c] && !old[c] && c_rise < 0) c_rise = c;
      if (!key[c] && old[c] && c_fall < 0) c_fall = c;
    end
    fork
      if (c_rise >= 0) begin
        wait (sl_v[c_rise] >= 7.0);
        t_rise = $realtime - t0;
        check(t_rise > 205.0 && t_rise < 215.0, $sformatf("SL%0d rise time %0.1f ns", c_rise, t_rise));
        n_rise++;
      end
      if (c_fall >= 0) begin
        wait (sl_v[c_fall] <= 0.0);
        t_fall = $realtime - t0;
        check(t_fall > 140.0 && t_fall < 150.0, $sformatf("SL%0d fall time %0.1f ns", c_fall, t_fall));
        n_fall++;
      end
    join
    #400;
    for (int c = 0; c < NUM_SL; c++) begin
      check((key[c] ? sl_v[c] : slb_v[c]) == 7.0, $sformatf("col %0d high side at 7 V", c));
      check((key[c] ? slb_v[c] : sl_v[c]) == 0.0, $sformatf("col %0d low side at 0 V", c));
    end
  endtask

  // RST, PCH, evaluate, LAT; then check the MLSA outputs and the address.
  task automatic sense(input logic [NUM_ML-1:0] exp_m);
    ml_addr_t exp_a;
    mlsa_rst = 1'b1; #50; mlsa_rst = 1'b0; #10;
    check(mlso == '0, "MLSA cleared");
    pch = 1'b1; #100; pch = 1'b0;
    #1000;
    lat = 1'b1; #20; lat = 1'b0; #10;
    exp_a = ref_addr(exp_m);
    check(mlso == exp_m, $sformatf("MLSA outputs %h exp %h", mlso, exp_m));
    check(addr == exp_a, $sformatf("address %0d exp %0d", addr, exp_a));
    n_match    += $countones(exp_m);
    n_mismatch += NUM_ML - $countones(exp_m);
    if ($countones(exp_m) > 1) n_multi++;
    if (exp_m == '0) n_nomatch++;
  endtask

  // Capture the address into the scan chain and shift it out.
  task automatic read_address(input ml_addr_t exp_a);
    logic [NUM_SL-1:0] serial;
    int cycles;
    @(negedge clk);
    se = 1'b1;
    @(negedge clk);
    se = 1'b0;
    n_capture++;
    cycles = 0;
    for (int i = NUM_SL - 1; i >= 0; i--) begin
      serial[i] = scan_out;
      sl_in = 1'b0;
      @(negedge clk);
      cycles++;
    end
    n_readout++;
    check(cycles == NUM_SL, "readout takes 16 clocks");
    check(serial[ENC_W-1:0] == exp_a, $sformatf("scanned address %0d exp %0d", serial[ENC_W-1:0], exp_a));
    for (int i = ENC_W; i < NUM_SL; i++)
      check(serial[i] == 1'(i % 2), $sformatf("test pattern bit %0d", i));
    $display("Search result: encoder output %b -> ML<%0d>", serial[ENC_W-1:0], serial[ENC_W-1:0]);
  endtask

  initial begin : watchdog
    #2000000;
    fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NUM_SL-1:0] key;
    logic [NUM_ML-1:0] exp_m;
    se = 1'b0; sl_in = 1'b0; trigger = 1'b0; latch_rst = 1'b1;
    mlsa_rst = 1'b1; pch = 1'b0; lat = 1'b0; force_ml = 1'b0;
    v_high = V_HIGH; v_pp = 3.5; v_low = V_LOW;
    for (int r = 0; r < NUM_ML; r++) begin
      stored[r] = '0;
      force_i[r] = 0.0;
    end
    #200;
    check(sl == '0, "latches cleared");
    n_clear++;
    latch_rst = 1'b0; mlsa_rst = 1'b0;
    #500;

    for (int s = 0; s < 12; s++) begin
      key = NUM_SL'($urandom);
      exp_m = (s == 1) ? '0 : NUM_ML'($urandom & $urandom);
      if (s == 2) exp_m = 16'h0001;
      for (int r = 0; r < NUM_ML; r++) begin
        if (exp_m[r]) stored[r] = key;
        else          stored[r] = key ^ (NUM_SL'($urandom) | (NUM_SL'(1) << (r % NUM_SL)));
      end
      apply_key(key);
      sense(exp_m);
      read_address(ref_addr(exp_m));
    end

    // Bench test: chosen matchlines held high, all others pulled down.
    force_ml = 1'b1;
    for (int k = 0; k < 3; k++) begin
      case (k)
        0:       exp_m = 16'h0004;
        1:       exp_m = 16'h0804;
        default: exp_m = 16'h8804;
      endcase
      for (int r = 0; r < NUM_ML; r++) force_i[r] = exp_m[r] ? 0.0 : 10.0 * I_ML_MIS;
      sense(exp_m);
      read_address(ref_addr(exp_m));
      n_forced++;
    end
    force_ml = 1'b0;

    latch_rst = 1'b1; #10;
    check(sl == '0, "latches cleared at end");
    n_clear++;
    latch_rst = 1'b0;

    $display("shift=%0d trigger=%0d clear=%0d rise=%0d fall=%0d match=%0d mismatch=%0d",
             n_shift, n_trigger, n_clear, n_rise, n_fall, n_match, n_mismatch);
    $display("multi=%0d nomatch=%0d capture=%0d readout=%0d forced=%0d",
             n_multi, n_nomatch, n_capture, n_readout, n_forced);
    check(n_shift > 0,    "mechanism: serial shift");
    check(n_trigger > 0,  "mechanism: trigger");
    check(n_clear > 0,    "mechanism: latch clear");
    check(n_rise > 0,     "mechanism: SL rise");
    check(n_fall > 0,     "mechanism: SL fall");
    check(n_match > 0,    "mechanism: match");
    check(n_mismatch > 0, "mechanism: mismatch");
    check(n_multi > 0,    "mechanism: priority among several matches");
    check(n_nomatch > 0,  "mechanism: no match");
    check(n_capture > 0,  "mechanism: parallel capture");
    check(n_readout > 0,  "mechanism: serial readout");
    check(n_forced > 0,   "mechanism: forced matchlines");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
