// Trigger latch between one scan flip-flop and its searchline.
//
// While trigger is high the latch is transparent and sl follows d (the scan
// flip-flop output); when trigger falls it holds, so the searchlines do not
// ripple while new search data is shifted through the chain. rst clears the
// stored bit. In the transistor cell a clocked inverter, enabled by Trigger and
// its complement Trigger_N, writes a cross-coupled inverter pair; here the
// complement is implied and the pair is a level-sensitive latch.
//
// This module is intentionally a latch (it is the published circuit), so a
// latch warning from synthesis is expected. rst has priority over trigger;
// that the cleared value is 0 is this design's choice.
`timescale 1ns/1ps
module scan_latch (
  input  logic rst,      // asynchronous clear, active high
  input  logic trigger,  // 1: transparent, 0: hold
  input  logic d,
  output logic sl
);

  always_latch begin
    if (rst || trigger) sl = rst ? 1'b0 : d;
  end

endmodule
