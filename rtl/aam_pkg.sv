// Shared constants of the aging-aware multiplier.
//
// WIDTH is the operand width of the main configuration (32 x 32 bits, 64-bit
// product). ZERO_TH is the zero-count threshold of the first judging block;
// the second judging block uses ZERO_TH + 1. ERR_WINDOW and ERR_TH set the
// aging indicator: more than ERR_TH Razor errors within ERR_WINDOW checked
// operations marks the circuit as aged. The operand width follows the
// described design; the three thresholds are this design's own choices.
package aam_pkg;
  localparam int unsigned WIDTH      = 32;
  localparam int unsigned ZERO_TH    = WIDTH / 2;
  localparam int unsigned ERR_WINDOW = 1024;
  localparam int unsigned ERR_TH     = 32;
endpackage
