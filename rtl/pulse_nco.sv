// pulse_nco: accumulator NCO in active-low pulse mode, the timing element
// of the Manchester decoder.
//
// On each fosc edge where clk_en is high, increment is added to an ACC_W-bit
// accumulator. out_n goes low on the first enabled edge and stays low until
// the enabled edge on which the addition carries out of the accumulator;
// on that edge out_n returns high and the accumulator is cleared. overflow
// is combinational: it is high in the cycle whose closing edge ends the
// pulse, so logic clocked by the same edge can act on the pulse end. A pulse therefore lasts
//     N = ceil(2^ACC_W / increment)
// enabled clocks (out_n is low for N-1 cycles and rises on the N-th edge).
// In the decoder clk_en is the CLC gate "start OR pulse running", so the
// pulse length is N fosc cycles and increment = ceil(2^ACC_W / N).
//
// Adding a fixed value to an accumulator at a clock supplied by the gate,
// and ending an active-low pulse at overflow, follow the design. Clearing
// the accumulator at overflow (so that every pulse has the same length),
// the accumulator width and the use of a clock enable instead of a gated
// clock are this implementation's choices. increment = 0 never overflows.
module pulse_nco
  import nco_pkg::*;
#(
  parameter int unsigned ACC_W = ACC_W_DEFAULT
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             clk_en,
  input  logic [ACC_W-1:0] increment,
  output logic             out_n,
  output logic             overflow
);

  logic [ACC_W-1:0] acc;
  logic [ACC_W:0]   sum;

  assign sum      = {1'b0, acc} + {1'b0, increment};
  assign overflow = clk_en && sum[ACC_W];

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      acc   <= '0;
      out_n <= 1'b1;
    end else begin
      if (clk_en) begin
        if (overflow) begin
          acc   <= '0;
          out_n <= 1'b1;
        end else begin
          acc   <= sum[ACC_W-1:0];
          out_n <= 1'b0;
        end
      end
    end
  end

endmodule
