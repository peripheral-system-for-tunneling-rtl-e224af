// High voltage switch (HVS): behavioural model of one searchline driver.
//
// This is a behavioural model of an analog level shifter, not synthesizable
// logic. The transistor circuit turns a 1.8 V digital input into the TFET gate
// read voltage: for vin = 1 the output is pulled to the V_HIGH rail (about
// 7 V), for vin = 0 a separate low-side stage drives it to the V_LOW rail
// (0 to 1 V). A cascode biased at VPP keeps every device's stress within range.
// The model keeps the real cell's pins (vin, vout and the three rails as real
// voltages) and reproduces its output: vout slews linearly towards the
// selected rail, covering the full swing in T_RISE ns when rising and T_FALL
// ns when falling, updated every STEP_NS ns. It reports, once, rails that are
// not ordered v_low < v_pp < v_high, since the cascode then cannot work.
//
// The rail levels and the 210 ns / 145 ns transition times follow the
// measured behaviour of the circuit; the linear ramp shape is this model's
// simplification.
`timescale 1ns/1ps
module hv_switch #(
  parameter real T_RISE  = 210.0,  // full-swing rise time (ns)
  parameter real T_FALL  = 145.0,  // full-swing fall time (ns)
  parameter real STEP_NS = 1.0     // model update step (ns)
) (
  input  logic vin,     // digital searchline bit
  input  real  v_high,  // high rail (V)
  input  real  v_pp,    // cascode bias (V)
  input  real  v_low,   // low rail (V)
  output real  vout     // searchline voltage (V)
);

  real target;
  real swing;
  bit  warned;

  initial begin
    vout   = 0.0;
    warned = 1'b0;
  end

  always begin
    #(STEP_NS);
    target = vin ? v_high : v_low;
    swing  = v_high - v_low;
    if (!warned && v_high > 0.0 && !(v_low < v_pp && v_pp < v_high)) begin
      $display("hv_switch %m: rails out of order (v_low=%0.2f v_pp=%0.2f v_high=%0.2f)",
               v_low, v_pp, v_high);
      warned = 1'b1;
    end
    if (vout < target) begin
      vout = vout + swing * STEP_NS / T_RISE;
      if (vout > target) vout = target;
    end else if (vout > target) begin
      vout = vout - swing * STEP_NS / T_FALL;
      if (vout < target) vout = target;
    end
  end

endmodule
