// tb_manchester_decoder: self-checking test of the Manchester decoder.
// An encoder in the testbench sends random frames in G.E. Thomas coding
// (1 = high then low, 0 = low then high) at several bit times B (in fosc
// cycles), with the NCO set for a pulse of N = round(3B/4) cycles. Before
// each frame the line rests at the first-half level of bit 0. The test
// checks that after the mid-bit transition of bit k the decoder outputs
// bit k+1 exactly N fosc cycles after the transition, that bit_valid
// strobes once per mid-bit transition and never at a bit boundary, that
// the bit 0 level is held before the frame, and that clock_out is low
// while the pulse runs. It also counts the bit-boundary transitions that
// fall inside a pulse (the masking the pulse exists for) and fails if
// there were none.
module tb_manchester_decoder;
  localparam int ACC_W = 16;

  logic             fosc = 1'b0;
  logic             rst;
  logic             data_in;
  logic [ACC_W-1:0] increment;
  logic             data_out;
  logic             clock_out;
  logic             bit_valid;
  int checks = 0, failures = 0;
  int masked_boundaries = 0;

  manchester_decoder #(.ACC_W(ACC_W)) dut (.*);

  always #5 fosc = ~fosc;

  // strobe log, written by a monitor
  int      strobe_cycle [$];
  logic    strobe_value [$];
  int      cycle = 0;
  always @(negedge fosc) begin
    cycle <= cycle + 1;
    if (bit_valid) begin
      strobe_cycle.push_back(cycle);
      strobe_value.push_back(data_out);
    end
  end

  task automatic expect_int(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge fosc);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // send one frame, data_in changing just after falling fosc edges
  task automatic send_frame(input int b_time, input int n_pulse, input int nbits);
    logic bits [];
    int   mid_cycle [];
    bits = new[nbits];
    mid_cycle = new[nbits];
    for (int i = 0; i < nbits; i++) bits[i] = 1'($urandom);
    // rest at the first-half level of bit 0 (G.E. Thomas: the bit itself)
    data_in = bits[0];
    repeat (n_pulse + 4) @(negedge fosc);
    expect_int(int'(data_out), int'(bits[0]), "bit 0 held before frame");
    strobe_cycle.delete();
    strobe_value.delete();
    for (int i = 0; i < nbits; i++) begin
      // first half: level = bit; boundary transition if the level changes
      if (i > 0 && data_in != bits[i]) begin
        if (!clock_out) masked_boundaries++;
        else begin
          failures++;
          $display("FAIL boundary transition of bit %0d outside a pulse", i);
        end
      end
      data_in = bits[i];
      repeat (b_time / 2) @(negedge fosc);
      // mid-bit transition
      data_in = ~bits[i];
      mid_cycle[i] = cycle;
      repeat (b_time - b_time / 2) @(negedge fosc);
    end
    repeat (2 * b_time) @(negedge fosc);
    expect_int(strobe_cycle.size(), nbits, "one strobe per mid-bit transition");
    for (int i = 0; i < nbits && i < strobe_cycle.size(); i++) begin
      // the change just after negedge 'cycle' is seen on the next posedge;
      // the N-th posedge samples, bit_valid is seen at the negedge after it
      expect_int(strobe_cycle[i] - mid_cycle[i], n_pulse, "latency from mid-bit to bit");
      if (i + 1 < nbits) expect_int(int'(strobe_value[i]), int'(bits[i + 1]), "decoded bit");
      else               expect_int(int'(strobe_value[i]), int'(!bits[i]), "stop level");
    end
  endtask

  // clock_out is low in the cycle before each strobe (pulse running) and
  // high in the strobe cycle (pulse ended on the sampling edge)
  logic prev_clock_out = 1'b1;
  always @(negedge fosc) begin
    prev_clock_out <= clock_out;
    if (!rst && bit_valid) begin
      checks++;
      if (prev_clock_out || !clock_out) begin
        failures++;
        $display("FAIL clock_out pulse shape at strobe, %0t", $time);
      end
    end
  end

  initial begin
    automatic int b_times [4] = '{8, 10, 16, 40};
    rst = 1'b1;
    data_in = 1'b0;
    increment = '0;
    repeat (2) @(negedge fosc);
    rst = 1'b0;
    foreach (b_times[j]) begin
      automatic int n_pulse;
      n_pulse = (3 * b_times[j] + 2) / 4;
      increment = ACC_W'(((longint'(1) << ACC_W) + longint'(n_pulse) - 1) / longint'(n_pulse));
      for (int f = 0; f < 12; f++) send_frame(b_times[j], n_pulse, $urandom_range(1, 24));
    end
    checks++;
    if (masked_boundaries == 0) begin
      failures++;
      $display("FAIL no bit-boundary transition was masked");
    end
    $display("masked bit-boundary transitions: %0d", masked_boundaries);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
