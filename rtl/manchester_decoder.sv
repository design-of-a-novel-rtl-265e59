// manchester_decoder: Manchester (G.E. Thomas) decoder built from a D
// flip-flop, an XOR, an AND-OR gate and a pulse NCO, all clocked by fosc.
//
// G.E. Thomas coding sends a 1 as a high-to-low and a 0 as a low-to-high
// transition in the middle of each bit, so the level in the first half of a
// bit is the bit itself. The decoder works in three stages:
//   stage 1 (D flip-flop)  q1 holds the line level sampled at the end of the
//                          last NCO pulse; it is the decoded output.
//   stage 2 (XOR)          data_in ^ q1 rises when the line leaves the
//                          sampled level, i.e. at a mid-bit transition.
//   stage 3 (AND-OR + NCO) the NCO is clocked while the XOR is high OR its
//                          own pulse is running (Fosc AND xor, OR Fosc AND
//                          pulse). It gives one active-low pulse of 3/4 bit
//                          time, which hides any bit-boundary transition;
//                          at its end the flip-flop samples the line, now a
//                          quarter bit into the next bit, and the XOR drops.
// The gated Fosc of the original gate network is a clock enable here.
//
// Timing: set the NCO for N fosc cycles (increment = ceil(2^ACC_W / N)),
// with N about 3/4 of a bit time and the half-bit time H strictly between
// N/2 and N. A mid-bit transition that follows fosc edge E0 makes data_out
// take the line level on edge E0+N, a quarter bit into the next bit, with
// bit_valid high for the cycle after that edge.
// Framing: the decoder must see a mid-bit transition first. Before a frame
// the line rests for at least N+1 cycles at the first-half level of the
// frame's first bit; the decoder then holds that level, which is bit 0.
// The mid-bit transition of bit k yields bit k+1; the one of the last bit
// yields the level the line rests at after the frame (a stop level).
// The stage structure and the G.E. Thomas convention follow the design.
// Sampling at the pulse end, reset values and the requirement that data_in
// be synchronous to fosc are this implementation's choices.
module manchester_decoder
  import nco_pkg::*;
#(
  parameter int unsigned ACC_W = ACC_W_DEFAULT
) (
  input  logic             fosc,
  input  logic             rst,
  input  logic             data_in,
  input  logic [ACC_W-1:0] increment,
  output logic             data_out,
  output logic             clock_out,
  output logic             bit_valid
);

  logic q1;          // stage 1: sampled line level (Data Out)
  logic xor_out;     // stage 2
  logic nco_clk_en;  // stage 3: AND-OR gate output
  logic pulse_end;

  assign xor_out    = data_in ^ q1;
  assign nco_clk_en = xor_out || !clock_out;

  pulse_nco #(.ACC_W(ACC_W)) u_nco (
    .clk       (fosc),
    .rst       (rst),
    .clk_en    (nco_clk_en),
    .increment (increment),
    .out_n     (clock_out),
    .overflow  (pulse_end)
  );

  always_ff @(posedge fosc or posedge rst) begin
    if (rst) begin
      q1        <= 1'b0;
      bit_valid <= 1'b0;
    end else begin
      bit_valid <= pulse_end;
      if (pulse_end) q1 <= data_in;
    end
  end

  assign data_out = q1;

endmodule
