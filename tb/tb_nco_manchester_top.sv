// tb_nco_manchester_top: end-to-end test of the NCO driving the Manchester
// decoder, with every parameter at its default.
//
// Part 1 runs the NCO alone on a 50 MHz input clock: outputs 0 and 1
// enabled at divide-by-10 and divide-by-2, then switched to divide-by-5 and
// divide-by-3, outputs 2 and 3 disabled. The period and high time of every
// output are measured in input clock cycles and compared with the ratio.
// A per-output reset and the global reset must hold outputs low.
// Part 2 uses output 0 at divide-by-10 as Fosc for the decoder and sends
// the frame 1101001 followed by random frames in G.E. Thomas coding, bit
// time 8 Fosc cycles, NCO pulse 6 cycles (3/4 bit). The decoded bits and
// the latency from each mid-bit transition are checked.
// Each mechanism (enable, disable, ratio switch, per-output reset, global
// reset, masked bit-boundary transition, decoded bit) is counted and must
// occur at least once.
module tb_nco_manchester_top;
  import nco_pkg::*;
  localparam int N_OUT = N_OUT_DEFAULT;
  localparam int DIV_W = DIV_W_DEFAULT;
  localparam int ACC_W = ACC_W_DEFAULT;

  logic                   input_clock = 1'b0;
  logic                   global_reset;
  logic [N_OUT-1:0]       output_reset;
  logic [N_OUT-1:0]       enable;
  logic [N_OUT*DIV_W-1:0] freq_divider;
  logic [N_OUT-1:0]       output_clk;
  logic                   data_in;
  logic [ACC_W-1:0]       increment;
  logic                   data_out;
  logic                   clock_out;
  logic                   bit_valid;
  int checks = 0, failures = 0;

  typedef enum int {M_ENABLE, M_DISABLE, M_RATIO_SWITCH, M_OUTPUT_RESET, M_GLOBAL_RESET,
                    M_MASKED_BOUNDARY, M_DECODED_BIT, M_COUNT} mech_e;
  int mech [M_COUNT];

  nco_manchester_top dut (.*);

  always #10 input_clock = ~input_clock;  // 50 MHz

  task automatic expect_int(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  // measure period and high time of every output over a window
  task automatic measure(input int ratios [N_OUT], input logic [N_OUT-1:0] on, input string what);
    int last_rise [N_OUT];
    int high_len [N_OUT];
    int periods [N_OUT];
    logic [N_OUT-1:0] prev;
    for (int i = 0; i < N_OUT; i++) begin
      last_rise[i] = -1;
      high_len[i] = 0;
      periods[i] = 0;
    end
    prev = output_clk;
    for (int c = 0; c < 200; c++) begin
      @(negedge input_clock);
      for (int i = 0; i < N_OUT; i++) begin
        if (!on[i]) expect_int(int'(output_clk[i]), 0, {what, ": disabled output low"});
        if (output_clk[i] && !prev[i]) begin
          if (last_rise[i] >= 0) begin
            expect_int(c - last_rise[i], ratios[i], {what, ": period"});
            expect_int(high_len[i], ratios[i] / 2, {what, ": high time"});
            periods[i]++;
          end
          last_rise[i] = c;
          high_len[i] = 0;
        end
        if (output_clk[i]) high_len[i]++;
      end
      prev = output_clk;
    end
    for (int i = 0; i < N_OUT; i++)
      if (on[i]) begin
        checks++;
        if (periods[i] < 5) begin
          failures++;
          $display("FAIL %s: output %0d ran only %0d periods", what, i, periods[i]);
        end
      end
  endtask

  // Manchester encoder on Fosc = output_clk[0]: data_in changes just after
  // rising Fosc edges
  int fosc_cycle = 0;
  always @(posedge output_clk[0]) fosc_cycle <= fosc_cycle + 1;

  int   strobe_cycle [$];
  logic strobe_value [$];
  always @(posedge output_clk[0]) begin
    if (bit_valid) begin
      strobe_cycle.push_back(fosc_cycle);
      strobe_value.push_back(data_out);
    end
  end

  task automatic send_frame(input logic bits [], input int b_time, input int n_pulse);
    int mid [];
    int nbits;
    nbits = bits.size();
    mid = new[nbits];
    @(posedge output_clk[0]);
    #1 data_in = bits[0];
    repeat (n_pulse + 4) @(posedge output_clk[0]);
    #1 expect_int(int'(data_out), int'(bits[0]), "bit 0 held before frame");
    strobe_cycle.delete();
    strobe_value.delete();
    for (int i = 0; i < nbits; i++) begin
      if (i > 0 && data_in != bits[i]) begin
        if (!clock_out) mech[M_MASKED_BOUNDARY]++;
        else begin
          failures++;
          $display("FAIL boundary transition outside a pulse");
        end
      end
      data_in = bits[i];
      repeat (b_time / 2) @(posedge output_clk[0]);
      #1 data_in = ~bits[i];
      mid[i] = fosc_cycle;
      repeat (b_time - b_time / 2) @(posedge output_clk[0]);
      #1;
    end
    repeat (2 * b_time) @(posedge output_clk[0]);
    #1 expect_int(strobe_cycle.size(), nbits, "strobes per frame");
    for (int i = 0; i < nbits && i < strobe_cycle.size(); i++) begin
      // the change follows the edge that made fosc_cycle = mid[i]; the
      // n_pulse-th edge after it samples the line, and the monitor sees
      // bit_valid on the next edge, before fosc_cycle has moved on
      expect_int(strobe_cycle[i] - mid[i], n_pulse, "latency");
      if (i + 1 < nbits) begin
        expect_int(int'(strobe_value[i]), int'(bits[i + 1]), "decoded bit");
        mech[M_DECODED_BIT]++;
      end else begin
        expect_int(int'(strobe_value[i]), int'(!bits[i]), "stop level");
      end
    end
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge input_clock);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic string names [M_COUNT] = '{"enable", "disable", "ratio switch", "output reset",
                                         "global reset", "masked boundary", "decoded bit"};
    automatic logic frame [] = '{1'b1, 1'b1, 1'b0, 1'b1, 1'b0, 1'b0, 1'b1};
    int n_pulse, b_time;
    for (int m = 0; m < M_COUNT; m++) mech[m] = 0;
    global_reset = 1'b1;
    output_reset = '0;
    enable = '0;
    freq_divider = '0;
    data_in = 1'b0;
    increment = '0;
    repeat (3) @(negedge input_clock);
    expect_int(int'(output_clk), 0, "outputs low in global reset");
    global_reset = 1'b0;
    mech[M_GLOBAL_RESET]++;

    // ---- part 1: the NCO ----
    freq_divider = {4'd0, 4'd0, 4'd2, 4'd10};
    enable = 4'b0011;
    mech[M_ENABLE]++;
    measure('{10, 2, 0, 0}, 4'b0011, "div 10 / div 2");
    freq_divider = {4'd0, 4'd0, 4'd3, 4'd5};
    mech[M_RATIO_SWITCH]++;
    repeat (12) @(negedge input_clock);
    measure('{5, 3, 0, 0}, 4'b0011, "div 5 / div 3");
    // per-output reset of output 1
    output_reset = 4'b0010;
    mech[M_OUTPUT_RESET]++;
    repeat (2) @(negedge input_clock);
    measure('{5, 0, 0, 0}, 4'b0001, "output 1 in reset");
    output_reset = '0;
    // all four on, then output 0 disabled
    freq_divider = {4'd15, 4'd7, 4'd3, 4'd5};
    enable = 4'b1111;
    mech[M_ENABLE]++;
    repeat (2) @(negedge input_clock);
    measure('{5, 3, 7, 15}, 4'b1111, "all enabled");
    enable = 4'b1110;
    mech[M_DISABLE]++;
    repeat (2) @(negedge input_clock);
    measure('{0, 3, 7, 15}, 4'b1110, "output 0 disabled");
    // global reset stops everything
    global_reset = 1'b1;
    mech[M_GLOBAL_RESET]++;
    repeat (2) @(negedge input_clock);
    expect_int(int'(output_clk), 0, "global reset holds outputs low");
    global_reset = 1'b0;

    // ---- part 2: the decoder on Fosc = input_clock / 10 ----
    freq_divider = {4'd0, 4'd0, 4'd2, 4'd10};
    enable = 4'b0011;
    b_time = 8;
    n_pulse = 6;
    increment = ACC_W'(((longint'(1) << ACC_W) + longint'(n_pulse) - 1) / longint'(n_pulse));
    send_frame(frame, b_time, n_pulse);
    for (int f = 0; f < 10; f++) begin
      logic bits [];
      bits = new[$urandom_range(2, 16)];
      foreach (bits[i]) bits[i] = 1'($urandom);
      send_frame(bits, b_time, n_pulse);
    end

    for (int m = 0; m < M_COUNT; m++) begin
      $display("mechanism %-16s : %0d", names[m], mech[m]);
      checks++;
      if (mech[m] == 0) begin
        failures++;
        $display("FAIL mechanism %s never happened", names[m]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
