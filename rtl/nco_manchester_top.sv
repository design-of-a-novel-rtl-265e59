// nco_manchester_top: the multi-output counter NCO with one of its outputs
// clocking a Manchester decoder.
//
// top_modul divides input_clock into N_OUT clocks with individual ratios,
// enables and resets. Output FOSC_SEL is the sampling clock (Fosc) of the
// manchester_decoder, which turns a G.E. Thomas coded line into data bits.
// The decoder therefore runs only while that output is enabled and has a
// ratio of 2 or more; it is held in reset while global_reset is high.
// data_in must change on rising edges of the selected output clock.
//
// Feeding an NCO output to the decoder as its clock follows the design;
// which output is used and the shared reset are this implementation's
// choices. All outputs stay available on output_clk.
module nco_manchester_top
  import nco_pkg::*;
#(
  parameter int unsigned N_OUT    = N_OUT_DEFAULT,
  parameter int unsigned DIV_W    = DIV_W_DEFAULT,
  parameter int unsigned ACC_W    = ACC_W_DEFAULT,
  parameter int unsigned FOSC_SEL = 0
) (
  input  logic                   input_clock,
  input  logic                   global_reset,
  input  logic [N_OUT-1:0]       output_reset,
  input  logic [N_OUT-1:0]       enable,
  input  logic [N_OUT*DIV_W-1:0] freq_divider,
  output logic [N_OUT-1:0]       output_clk,
  input  logic                   data_in,
  input  logic [ACC_W-1:0]       increment,
  output logic                   data_out,
  output logic                   clock_out,
  output logic                   bit_valid
);

  top_modul #(.N_OUT(N_OUT), .DIV_W(DIV_W)) u_nco (
    .global_reset (global_reset),
    .output_reset (output_reset),
    .input_clock  (input_clock),
    .enable       (enable),
    .freq_divider (freq_divider),
    .output_clk   (output_clk)
  );

  manchester_decoder #(.ACC_W(ACC_W)) u_decoder (
    .fosc      (output_clk[FOSC_SEL]),
    .rst       (global_reset),
    .data_in   (data_in),
    .increment (increment),
    .data_out  (data_out),
    .clock_out (clock_out),
    .bit_valid (bit_valid)
  );

endmodule
