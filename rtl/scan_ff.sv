// Unit scan flip-flop (SFF) of the search data register.
//
// A 2:1 multiplexer in front of a D flip-flop. With SE low the flop takes DI,
// which in the search data register is the previous stage's Q, so the chain
// shifts. With SE high it takes SI, which carries a priority encoder output bit
// (or a fixed test level), so the chain captures in parallel. The flop has no
// reset, like the cell it models: its content is defined by shifting.
//
// Timing: q updates on the rising edge of clk; se, si and di must be stable
// around that edge. The mux and flop follow the published circuit; the choice that
// SE = 1 selects SI is this design's reading of the "Scan Enable" name.
`timescale 1ns/1ps
module scan_ff (
  input  logic clk,
  input  logic se,   // 1: load si, 0: load di
  input  logic si,   // parallel (scan) input
  input  logic di,   // chain (data) input
  output logic q
);

  logic d;

  always_comb d = se ? si : di;

  always_ff @(posedge clk) q <= d;

endmodule
