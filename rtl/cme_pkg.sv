// cme_pkg: constants shared by the CME-SVPWM (space-vector PWM with
// common-mode voltage elimination) modulator.
//
// The defaults describe the five-level, five-phase drive built around a
// 50 MHz FPGA: P = 5 phases, N = 5 levels, 9.8 kHz switching frequency and a
// 4 us dead time. The fixed-point formats are this design's own choice:
// reference voltages are signed numbers in units of the inverter voltage step
// Vdc with FRAC fractional bits.
package cme_pkg;

  // Drive configuration
  localparam int unsigned P        = 5;      // number of phases
  localparam int unsigned N_LEVELS = 5;      // inverter levels per phase (odd)
  localparam int unsigned CLK_HZ   = 50_000_000;
  localparam int unsigned FSW_HZ   = 9_800;  // switching frequency
  localparam int unsigned PERIOD   = (CLK_HZ + FSW_HZ / 2) / FSW_HZ; // 5102 clocks
  localparam int unsigned DEAD_NS  = 4_000;
  localparam int unsigned DEAD     = DEAD_NS / (1_000_000_000 / CLK_HZ); // 200 clocks

  // Fixed-point formats
  localparam int unsigned FRAC  = 12;        // fractional bits of references
  localparam int unsigned REF_W = 16;        // phase reference width (Q3.12 + sign)
  localparam int unsigned LVL_W = 4;         // signed width of one phase level

  // Reference voltages before normalization: volts, signed, VIN_FRAC
  // fractional bits (range +-512 V). The reciprocal of the voltage step,
  // 1/Vdc, is unsigned with INV_FRAC fractional bits (Vdc >= 4 V).
  localparam int unsigned VIN_W    = 16;
  localparam int unsigned VIN_FRAC = 6;
  localparam int unsigned INV_W    = 18;
  localparam int unsigned INV_FRAC = 20;

  // Width of one component of the reduced reference vector: it is a sum of up
  // to P-1 phase references.
  function automatic int unsigned red_width(int unsigned ref_w, int unsigned p);
    return ref_w + $clog2(p) + 1;
  endfunction

endpackage
