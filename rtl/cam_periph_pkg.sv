// Shared constants of the TFET CAM peripheral system.
//
// The peripheral system drives a 16 x 16 TFET CAM array: 16 searchline pairs
// (SL/SLB) and 16 matchlines (ML). A matchline index is a 4-bit address. The
// analog levels are the read biases of the targeted TFET CAM cell: a searchline
// carrying '1' is driven to 7 V, one carrying '0' to 0 V, and a matchline is
// precharged to about 1 V (VDD - VTHN with VDD = 1.8 V). The mismatch current of
// one cell is about 100 nA. These numbers follow the cell characterisation the
// design was made for; the matchline capacitance and latch trip point are this
// design's own estimates, used only by the behavioural models.
`timescale 1ns/1ps
package cam_periph_pkg;

  localparam int unsigned NUM_SL = 16;  // searchline pairs (columns)
  localparam int unsigned NUM_ML = 16;  // matchlines (rows)
  localparam int unsigned ADDR_W = 4;   // width of a matchline address
  localparam int unsigned ENC_W  = 4;   // encoder bits captured by the scan chain

  // Analog levels (volts, amperes, farads)
  localparam real VDD        = 1.8;     // core supply
  localparam real V_HIGH     = 7.0;     // searchline level for digital '1'
  localparam real V_LOW      = 0.0;     // searchline level for digital '0'
  localparam real V_ML_PCH   = 1.0;     // matchline precharge level, VDD - VTHN
  localparam real I_ML_MIS   = 100.0e-9; // matchline current of one mismatching cell
  localparam real C_ML       = 100.0e-15; // matchline capacitance (estimate)
  localparam real V_ML_TRIP  = 0.5;     // sense latch trip point (estimate)

  // Searchline transition times of the high voltage switch (ns)
  localparam real T_SL_RISE  = 210.0;
  localparam real T_SL_FALL  = 145.0;

  typedef logic [ADDR_W-1:0] ml_addr_t;

endpackage
