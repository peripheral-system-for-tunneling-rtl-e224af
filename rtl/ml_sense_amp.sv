// Matchline sense amplifier (MLSA): behavioural model of one matchline and its
// sense latch.
//
// This is a behavioural model of an analog circuit, not synthesizable logic.
// The circuit has an NMOS precharge device (M1, gate PCH), a latch whose one
// side is pulled down through two series NMOS devices gated by the matchline
// (M2) and by LAT (M3), and an NMOS reset device (M4, gate RST) on the output.
// An NMOS is used for precharge because the matchline only has to reach
// VDD - VTHN (about 1 V), the TFET drain read voltage.
//
// One search runs in four steps: (1) RST pulse clears mlso to 0; (2) PCH
// pulse charges the matchline to V_PCH; (3) evaluation: the cells draw the
// current ml_i from the matchline, which stays high on a match (no current)
// and discharges on a mismatch; (4) LAT pulse: if the matchline is still above
// the latch trip point, the latch flips and mlso becomes 1 (match); otherwise
// it keeps 0 (mismatch). mlso then holds until the next RST, so mlso is a
// latch by design; it is undefined until the first RST. An assertion flags
// PCH and LAT overlapping.
//
// Model: the matchline is a capacitor C_ML updated every STEP_NS ns; ml_v is
// brought out for observation. The four steps and the precharge level follow
// the published circuit; the capacitance and trip point are estimates of this model.
`timescale 1ns/1ps
module ml_sense_amp
  import cam_periph_pkg::*;
#(
  parameter real V_PCH   = V_ML_PCH,   // precharge level (V)
  parameter real V_TRIP  = V_ML_TRIP,  // latch trip point (V)
  parameter real C_LINE  = C_ML,       // matchline capacitance (F)
  parameter real STEP_NS = 1.0         // model update step (ns)
) (
  input  logic rst,   // clears mlso
  input  logic pch,   // precharge the matchline
  input  logic lat,   // sense strobe
  input  real  ml_i,  // current drawn from the matchline by the cells (A)
  output real  ml_v,  // matchline voltage (V)
  output logic mlso   // 1: match latched
);

  initial ml_v = 0.0;

  always begin
    #(STEP_NS);
    if (pch) begin
      ml_v = V_PCH;
    end else begin
      ml_v = ml_v - ml_i * STEP_NS * 1.0e-9 / C_LINE;
      if (ml_v < 0.0) ml_v = 0.0;
    end
  end

  // Sense latch: reset device wins; M2/M3 flip the latch when both conduct.
  always_latch begin
    if (rst || (lat && ml_v > V_TRIP)) mlso = !rst;
  end

  // PCH and LAT belong to different steps of the sequence: sensing while the
  // precharge device is on would always read a match.
  always @(pch, lat) begin
    assert (!(pch && lat))
      else $error("ml_sense_amp %m: PCH and LAT active together");
  end

endmodule
