// top_modul: the multi-output counter-based NCO.
//
// One input clock yields N_OUT clocks, each at input_clock / D_i with its
// own 4-bit ratio D_i in freq_divider, its own enable and its own reset. A
// reset_register puts output_reset on the input clock and lets the single
// global_reset force every output into reset; four_output_clk_divider does
// the division. There is no lookup table: each output is one small counter,
// so a new ratio needs no recomputed table, and unused outputs are simply
// disabled.
//
// Timing: a change on output_reset reaches the divider one input_clock
// edge later; global_reset takes effect at once (asynchronous set of the
// reset register) and is released on the next edge after it falls. This
// structure follows the design's block diagram.
module top_modul
  import nco_pkg::*;
#(
  parameter int unsigned N_OUT = N_OUT_DEFAULT,
  parameter int unsigned DIV_W = DIV_W_DEFAULT
) (
  input  logic                   global_reset,
  input  logic [N_OUT-1:0]       output_reset,
  input  logic                   input_clock,
  input  logic [N_OUT-1:0]       enable,
  input  logic [N_OUT*DIV_W-1:0] freq_divider,
  output logic [N_OUT-1:0]       output_clk
);

  logic [N_OUT-1:0] reset;

  reset_register #(.N_OUT(N_OUT)) u_reset_register (
    .input_clock  (input_clock),
    .global_reset (global_reset),
    .output_reset (output_reset),
    .reset        (reset)
  );

  four_output_clk_divider #(.N_OUT(N_OUT), .DIV_W(DIV_W)) top_module_instance (
    .input_clock  (input_clock),
    .reset        (reset),
    .enable       (enable),
    .freq_divider (freq_divider),
    .output_clk   (output_clk)
  );

endmodule
