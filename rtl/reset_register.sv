// reset_register: the per-output reset register in front of the divider.
//
// A bank of N_OUT flip-flops on input_clock samples output_reset, so that a
// reset request reaches each divider output on a clock edge. The one-bit
// global_reset sets every bit at once, asynchronously, and so resets every
// output of the NCO. Pin roles (set, data, clock, Q) follow the design's
// block diagram; the asynchronous, active-high set is this design's choice.
//
// Timing: reset follows output_reset one input_clock edge later; it goes to
// all ones as soon as global_reset rises and stays there while it is high.
module reset_register
  import nco_pkg::*;
#(
  parameter int unsigned N_OUT = N_OUT_DEFAULT
) (
  input  logic             input_clock,
  input  logic             global_reset,
  input  logic [N_OUT-1:0] output_reset,
  output logic [N_OUT-1:0] reset
);

  always_ff @(posedge input_clock or posedge global_reset) begin
    if (global_reset) reset <= '1;
    else              reset <= output_reset;
  end

endmodule
