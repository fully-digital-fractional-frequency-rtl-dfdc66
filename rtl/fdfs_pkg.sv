// Shared constants of the fractional frequency synthesizer.
//
// The counter widths follow the FPGA version of the synthesizer: a 24-bit
// input-period counter (Counter 1) and a 32-bit output-period counter
// (Counter 2). The 8-bit difference lets the control word multiply or divide
// the ratio by up to 2^8, so the scale factors m1 and k1 are 9 bits wide
// (1..256). Fine tuning adds or subtracts a 23-bit integer. The fractional
// width of C2, the generator divider width and the adaptive scaling range
// are this design's own choices.
package fdfs_pkg;
  localparam int unsigned C1_W    = 24;  // Counter 1 length
  localparam int unsigned C2_W    = 32;  // Counter 2 length
  localparam int unsigned M_W     = 9;   // m1 / k1 width, up to 2^8
  localparam int unsigned FINE_W  = 23;  // fine-tuning magnitude width
  localparam int unsigned FRAC_W  = 16;  // fractional part R of C2
  localparam int unsigned GEN_W   = 8;   // generator divide-ratio width
  localparam int unsigned EXP_MAX = 8;   // adaptive scaling range, 2^0..2^8
  localparam int unsigned N_W     = 16;  // PLL feedback divider width
  localparam int unsigned SLICE_W = 8;   // Counter 2 slice width

endpackage
