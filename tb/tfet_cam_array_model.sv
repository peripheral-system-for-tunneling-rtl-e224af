// Behavioural model of a 16 x 16 TFET CAM array, used only by testbenches.
//
// Each cell holds one bit as a pair of TFET memory elements in opposite
// states: for a stored '1' the element on SL is programmed (high threshold)
// and the one on SLB erased; for a stored '0' the reverse. Both drains sit on
// the row's matchline. An erased element conducts when its gate is driven to
// the high search level; a programmed one does not. A cell therefore draws
// the mismatch current I_ML_MIS (about 100 nA) from its matchline exactly
// when the search bit differs from the stored bit, and ml_i[r] is the sum
// over the row. V_GATE_ON, the gate voltage above which an erased element
// conducts, lies between the 0 V and 7 V search levels.
`timescale 1ns/1ps
module tfet_cam_array_model
  import cam_periph_pkg::*;
#(
  parameter real V_GATE_ON = 3.5
) (
  input  logic [NUM_SL-1:0] stored [NUM_ML],  // stored word of each row
  input  real               sl_v   [NUM_SL],
  input  real               slb_v  [NUM_SL],
  output real               ml_i   [NUM_ML]
);

  always_comb begin
    for (int r = 0; r < NUM_ML; r++) begin
      ml_i[r] = 0.0;
      for (int c = 0; c < NUM_SL; c++) begin
        // erased SL element (stored 0) conducts with SL high;
        // erased SLB element (stored 1) conducts with SLB high
        if ((!stored[r][c] && sl_v[c] > V_GATE_ON) || (stored[r][c] && slb_v[c] > V_GATE_ON))
          ml_i[r] = ml_i[r] + I_ML_MIS;
      end
    end
  end

endmodule
