// nco_pkg: sizes shared by the multi-output counter NCO and the Manchester
// decoder that it clocks.
//
// Four outputs on one input clock is the design's own figure. The 4-bit
// divide-ratio field per output (the 16-bit freq_divider bus cut in four)
// and the 16-bit accumulator of the decoder's pulse NCO are choices of this
// implementation.
package nco_pkg;
  localparam int unsigned N_OUT_DEFAULT = 4;   // divided clock outputs
  localparam int unsigned DIV_W_DEFAULT = 4;   // bits of divide ratio per output
  localparam int unsigned ACC_W_DEFAULT = 16;  // pulse NCO accumulator width
endpackage
