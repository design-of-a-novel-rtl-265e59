// four_output_clk_divider: N_OUT independent programmable clock dividers
// sharing one input clock; the core of the multi-output counter NCO.
//
// Output i has its own counter that runs 0 .. D-1, with D the ratio in
// freq_divider[DIV_W*i +: DIV_W]. The output is registered and is high for
// the first floor(D/2) counts of each period and low for the rest, so it
// runs at f_in / D: 50% duty for even D, one input period longer low than
// high for odd D. A new ratio takes effect at once; a counter already past
// the new end wraps to 0. Ratios 0 and 1 hold the output low.
//
// enable[i] = 0 or reset[i] = 1 holds output i low and parks its counter so that it
// restarts at count 0;
// once both are released the output goes high on the next input_clock edge
// and a full period follows. Only the enabled outputs toggle, which is how
// the design lets a system switch off the clocks it does not need.
//
// Each output dividing by its own ratio, enable and per-output reset follow
// the design; the duty-cycle rule, the ratio field width and the handling
// of ratios below 2 are this implementation's choices.
module four_output_clk_divider
  import nco_pkg::*;
#(
  parameter int unsigned N_OUT = N_OUT_DEFAULT,
  parameter int unsigned DIV_W = DIV_W_DEFAULT
) (
  input  logic                   input_clock,
  input  logic [N_OUT-1:0]       reset,
  input  logic [N_OUT-1:0]       enable,
  input  logic [N_OUT*DIV_W-1:0] freq_divider,
  output logic [N_OUT-1:0]       output_clk
);

  for (genvar i = 0; i < N_OUT; i++) begin : g_out
    logic [DIV_W-1:0] ratio;
    logic [DIV_W-1:0] count;
    logic [DIV_W-1:0] count_next;
    logic             run;

    assign ratio = freq_divider[DIV_W*i +: DIV_W];
    assign run   = enable[i] && !reset[i] && (ratio >= DIV_W'(2));

    always_comb begin
      if (!run || count >= ratio - DIV_W'(1)) count_next = '0;
      else                                    count_next = count + DIV_W'(1);
    end

    always_ff @(posedge input_clock) begin
      if (!run) begin
        count         <= '1;  // wraps to 0 on the first running edge
        output_clk[i] <= 1'b0;
      end else begin
        count         <= count_next;
        output_clk[i] <= (count_next < (ratio >> 1));
      end
    end
  end

endmodule
