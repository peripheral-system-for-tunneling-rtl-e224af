// Search data register: a scan chain of WIDTH scan flip-flops with one trigger
// latch per stage.
//
// Search data enter serially at sl_in: with se low, every rising clk edge
// shifts the chain one stage, SFF0 -> SFF1 -> ... -> SFF(WIDTH-1), so the bit
// shifted in first ends in the last stage after WIDTH clocks. Raising trigger
// copies all stage outputs into the latches at once; the latch outputs sl are
// the digital searchline inputs of the high voltage switches.
//
// The same chain returns the search result. With se high one clk edge loads
// each stage from its SI pin: stages 0..ENC_W-1 take the priority encoder
// outputs enc_in[0..ENC_W-1], the other stages take a fixed alternating test
// pattern used to check the chain. With se low again the chain shifts out at
// scan_out (the last stage); after WIDTH-ENC_W shifts the test pattern has
// left and scan_out presents enc_in[ENC_W-1] down to enc_in[0], MSB first.
//
// Interface: clk, se, sl_in, enc_in as described; trigger and latch_rst act on
// the latches asynchronously. Chain structure, SI assignment of the encoder
// bits and the trigger latches follow the published circuit; the test pattern values
// (stage i gets i mod 2) and the serial output at the last stage are this
// design's choices.
`timescale 1ns/1ps
module search_data_register #(
  parameter int unsigned WIDTH = 16,  // number of stages = searchline pairs
  parameter int unsigned ENC_W = 4    // stages that capture encoder outputs
) (
  input  logic             clk,
  input  logic             se,         // 1: parallel capture, 0: shift
  input  logic             sl_in,      // serial search data input
  input  logic [ENC_W-1:0] enc_in,     // priority encoder outputs (SI of stages 0..ENC_W-1)
  input  logic             trigger,    // latch enable
  input  logic             latch_rst,  // latch clear
  output logic [WIDTH-1:0] sl,         // latched searchline data
  output logic [WIDTH-1:0] chain_q,    // stage outputs (for observation)
  output logic             scan_out    // serial output, last stage
);

  logic [WIDTH-1:0] si;
  logic [WIDTH-1:0] di;

  for (genvar i = 0; i < WIDTH; i++) begin : g_stage
    if (i < ENC_W) begin : g_enc
      assign si[i] = enc_in[i];
    end else begin : g_pat
      assign si[i] = 1'(i % 2);
    end

    if (i == 0) begin : g_first
      assign di[i] = sl_in;
    end else begin : g_next
      assign di[i] = chain_q[i-1];
    end

    scan_ff u_sff (
      .clk (clk),
      .se  (se),
      .si  (si[i]),
      .di  (di[i]),
      .q   (chain_q[i])
    );

    scan_latch u_latch (
      .rst     (latch_rst),
      .trigger (trigger),
      .d       (chain_q[i]),
      .sl      (sl[i])
    );
  end

  assign scan_out = chain_q[WIDTH-1];

endmodule
