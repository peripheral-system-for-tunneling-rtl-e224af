// 16-to-4 priority encoder for the matchline sense amplifier outputs.
//
// y is the index of the highest-numbered set input; lower inputs are don't
// care, so several simultaneous matches still give one valid address (d[0]
// never appears in the equations: it only matters when y = 0 anyway). Each
// output bit is the two-level sum of products derived from the truth table,
// written as the equations the gate-level circuit is built from (no behavioural
// loop). With no input set y is 0, the same as a match on input 0: the
// circuit has no separate match-found output.
//
// Purely combinational. The equations and their structure follow the
// published circuit.
`timescale 1ns/1ps
module priority_encoder (
  input  logic [15:0] d,  // MLSA outputs, 1 = match
  output logic [3:0]  y   // address of the highest set input
);

  always_comb begin
    y[0] = (~d[14] & ~d[12] & ~d[10] & ~d[8] &
              ((~d[6] & ~d[4] & ~d[2] & d[1]) |
               (~d[6] & ~d[4] & d[3]) |
               (~d[6] & d[5]) |
               d[7]))
         | (~d[14] & ~d[12] & ((~d[10] & d[9]) | d[11]))
         | (~d[14] & d[13])
         | d[15];

    y[1] = (~d[13] & ~d[12] & ~d[9] & ~d[8] &
              ((~d[5] & ~d[4] & d[2]) |
               (~d[5] & ~d[4] & d[3]) |
               d[7] | d[6]))
         | (~d[13] & ~d[12] & (d[11] | d[10]))
         | d[15] | d[14];

    y[2] = (~d[11] & ~d[10] & ~d[9] & ~d[8] & (d[7] | d[6] | d[5] | d[4]))
         | d[15] | d[14] | d[13] | d[12];

    y[3] = d[15] | d[14] | d[13] | d[12] | d[11] | d[10] | d[9] | d[8];
  end

endmodule
