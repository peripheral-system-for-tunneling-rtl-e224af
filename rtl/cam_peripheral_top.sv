// Peripheral system of a 16 x 16 TFET content addressable memory (CAM).
//
// The CAM array itself sits outside this module: its 16 searchline pairs
// (sl_v/slb_v) are outputs and the current each of its 16 matchlines draws
// (ml_i) is an input. A search goes through four parts:
//
//   1. search_data_register: the 16-bit search word is shifted in serially at
//      sl_in (se = 0, one bit per clk, bit for SL15 first) and copied to the
//      trigger latches by a trigger pulse.
//   2. hv_switch x 32: each latched bit b drives SL to v_high when b = 1 and
//      v_low when b = 0; its SLB driver gets the complement.
//   3. ml_sense_amp x 16: mlsa_rst clears the sense latches, pch precharges
//      the matchlines, the array discharges mismatching ones, and a lat pulse
//      latches mlso = 1 on every matchline still high (match).
//   4. priority_encoder: addr is the highest-numbered matching matchline.
//      One clk with se = 1 captures addr into scan stages 0..3; 16 more
//      clks with se = 0 shift it out at scan_out after the 12-bit test
//      pattern, MSB first.
//
// The control pins (clk, se, trigger, latch_rst, mlsa_rst, pch, lat) are
// sequenced from outside the chip. The block structure, widths and analog
// levels follow the published circuit; driving SLB from the complement of the same
// latched bit, the serial output pin and the analog port style are this
// design's choices. The analog drivers and sense amplifiers are behavioural
// models.
`timescale 1ns/1ps
module cam_peripheral_top
  import cam_periph_pkg::*;
(
  // scan chain and searchline latch control
  input  logic              clk,
  input  logic              se,          // 1: capture encoder output, 0: shift
  input  logic              sl_in,       // serial search data
  input  logic              trigger,     // latch search data onto the searchlines
  input  logic              latch_rst,   // clear the searchline latches
  output logic              scan_out,    // serial output of the scan chain
  // matchline sensing control
  input  logic              mlsa_rst,    // clear the sense latches
  input  logic              pch,         // precharge the matchlines
  input  logic              lat,         // sense strobe
  // analog rails of the high voltage switches (V)
  input  real               v_high,
  input  real               v_pp,
  input  real               v_low,
  // CAM array side
  output real               sl_v  [NUM_SL],  // searchline voltages
  output real               slb_v [NUM_SL],  // complementary searchline voltages
  input  real               ml_i  [NUM_ML],  // current drawn from each matchline (A)
  output real               ml_v  [NUM_ML],  // matchline voltages
  // observation
  output logic [NUM_SL-1:0] sl,          // latched digital search data
  output logic [NUM_ML-1:0] mlso,        // sense amplifier outputs, 1 = match
  output ml_addr_t          addr         // priority encoder output
);


  search_data_register #(
    .WIDTH (NUM_SL),
    .ENC_W (ENC_W)
  ) u_sdr (
    .clk       (clk),
    .se        (se),
    .sl_in     (sl_in),
    .enc_in    (addr),
    .trigger   (trigger),
    .latch_rst (latch_rst),
    .sl        (sl),
    .chain_q   (),
    .scan_out  (scan_out)
  );

  for (genvar c = 0; c < NUM_SL; c++) begin : g_col
    hv_switch #(
      .T_RISE (T_SL_RISE),
      .T_FALL (T_SL_FALL)
    ) u_hvs_sl (
      .vin    (sl[c]),
      .v_high (v_high),
      .v_pp   (v_pp),
      .v_low  (v_low),
      .vout   (sl_v[c])
    );

    hv_switch #(
      .T_RISE (T_SL_RISE),
      .T_FALL (T_SL_FALL)
    ) u_hvs_slb (
      .vin    (~sl[c]),
      .v_high (v_high),
      .v_pp   (v_pp),
      .v_low  (v_low),
      .vout   (slb_v[c])
    );
  end

  for (genvar r = 0; r < NUM_ML; r++) begin : g_row
    ml_sense_amp u_mlsa (
      .rst  (mlsa_rst),
      .pch  (pch),
      .lat  (lat),
      .ml_i (ml_i[r]),
      .ml_v (ml_v[r]),
      .mlso (mlso[r])
    );
  end

  priority_encoder u_pe (
    .d (mlso),
    .y (addr)
  );

endmodule
