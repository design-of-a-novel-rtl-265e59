// tb_four_output_clk_divider: self-checking test of the four programmable
// dividers. Each output is compared, every input_clock cycle, with the
// closed-form expectation
//     output_clk[i] = ((k-1) mod D_i) < floor(D_i/2)
// where k counts the running edges since output i was last started (enabled,
// out of reset, ratio 2 or more). Disabled, reset or ratio-0/1 outputs must
// stay low. The test starts with the ratios 10/2 on outputs 0/1 and 5/3
// after a switch (the settings shown for the design), then runs random
// ratios with random enables and resets, and finally changes a ratio while
// the output runs and measures the period between rising edges afterwards.
module tb_four_output_clk_divider;
  localparam int N_OUT = 4;
  localparam int DIV_W = 4;

  logic                   input_clock = 1'b0;
  logic [N_OUT-1:0]       reset;
  logic [N_OUT-1:0]       enable;
  logic [N_OUT*DIV_W-1:0] freq_divider;
  logic [N_OUT-1:0]       output_clk;
  int checks = 0, failures = 0;

  four_output_clk_divider #(.N_OUT(N_OUT), .DIV_W(DIV_W)) dut (.*);

  always #5 input_clock = ~input_clock;

  // running-edge counters of the reference, updated at each posedge from
  // the inputs that edge samples
  int k [N_OUT];
  always @(posedge input_clock) begin
    for (int i = 0; i < N_OUT; i++) begin
      int d;
      d = int'(freq_divider[DIV_W*i +: DIV_W]);
      if (enable[i] && !reset[i] && d >= 2) k[i] <= k[i] + 1;
      else                                  k[i] <= 0;
    end
  end

  function automatic logic expected(int i);
    int d;
    d = int'(freq_divider[DIV_W*i +: DIV_W]);
    if (k[i] == 0 || d < 2) return 1'b0;
    return ((k[i] - 1) % d) < (d / 2);
  endfunction

  task automatic check_all(input string what);
    for (int i = 0; i < N_OUT; i++) begin
      checks++;
      if (output_clk[i] !== expected(i)) begin
        failures++;
        if (failures < 20)
          $display("FAIL %s: output %0d = %b expected %b (k=%0d d=%0d) at %0t", what, i,
                   output_clk[i], expected(i), k[i], freq_divider[DIV_W*i +: DIV_W], $time);
      end
    end
  endtask

  task automatic run(input int cycles, input string what);
    repeat (cycles) begin
      @(negedge input_clock);
      check_all(what);
    end
  endtask

  function automatic logic [N_OUT*DIV_W-1:0] ratios(int r0, int r1, int r2, int r3);
    return {DIV_W'(r3), DIV_W'(r2), DIV_W'(r1), DIV_W'(r0)};
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge input_clock);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last_rise, d_new;
    logic prev;
    for (int i = 0; i < N_OUT; i++) k[i] = 0;
    reset = '1;
    enable = '0;
    freq_divider = ratios(10, 2, 7, 4);
    repeat (3) @(negedge input_clock);
    check_all("held in reset");
    // outputs 0 and 1 enabled, 2 and 3 disabled
    reset = '0;
    enable = 4'b0011;
    run(60, "div 10 / div 2");
    // switch through disable to div 5 / div 3
    enable = '0;
    run(2, "disabled");
    freq_divider = ratios(5, 3, 7, 4);
    enable = 4'b0011;
    run(60, "div 5 / div 3");
    // all off
    enable = '0;
    run(20, "all disabled");
    // random ratios, enables and resets, changed only while stopped
    for (int n = 0; n < 60; n++) begin
      int pick;
      pick = $urandom_range(0, N_OUT - 1);
      if ($urandom_range(0, 3) == 0) begin
        reset[pick] = ~reset[pick];
      end else begin
        enable[pick] = 1'b0;
        @(negedge input_clock);
        check_all("random stop");
        freq_divider[DIV_W*pick +: DIV_W] = DIV_W'($urandom);
        enable = N_OUT'($urandom) | (N_OUT'(1) << pick);
      end
      run($urandom_range(1, 40), "random");
    end
    // ratio change while running: after two new periods, the distance
    // between rising edges must be the new ratio
    reset = '0;
    enable = 4'b0001;
    freq_divider = ratios(12, 0, 0, 0);
    run(30, "div 12");
    d_new = 6;
    freq_divider = ratios(d_new, 0, 0, 0);
    repeat (2 * 12) @(negedge input_clock);
    last_rise = -1;
    prev = output_clk[0];
    for (int c = 0; c < 40; c++) begin
      @(negedge input_clock);
      if (output_clk[0] && !prev) begin
        if (last_rise >= 0) begin
          checks++;
          if (c - last_rise != d_new) begin
            failures++;
            $display("FAIL period after ratio change: %0d expected %0d", c - last_rise, d_new);
          end
        end
        last_rise = c;
      end
      prev = output_clk[0];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
