// tb_reset_register: self-checking test of the per-output reset register.
// Drives random output_reset words and pulses of global_reset at random
// points in the clock period. Checks that reset follows output_reset one
// input_clock edge later, that global_reset sets every bit at once (before
// any clock edge) and holds them set, and that the register follows
// output_reset again from the first edge after global_reset falls.
module tb_reset_register;
  localparam int N_OUT = 4;

  logic             input_clock = 1'b0;
  logic             global_reset;
  logic [N_OUT-1:0] output_reset;
  logic [N_OUT-1:0] reset;
  int checks = 0, failures = 0;

  reset_register #(.N_OUT(N_OUT)) dut (.*);

  always #5 input_clock = ~input_clock;

  task automatic check(input logic [N_OUT-1:0] exp, input string what);
    checks++;
    if (reset !== exp) begin
      failures++;
      $display("FAIL %s: reset=%b expected %b at %0t", what, reset, exp, $time);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge input_clock);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N_OUT-1:0] prev;
    global_reset = 1'b1;
    output_reset = '0;
    @(negedge input_clock);
    check('1, "global reset from start");
    @(negedge input_clock);
    global_reset = 1'b0;
    @(negedge input_clock);
    check('0, "released, follows output_reset=0");
    for (int i = 0; i < 400; i++) begin
      prev = output_reset;
      output_reset = N_OUT'($urandom);
      #1 check(prev, "no change before the clock edge");
      @(negedge input_clock);
      check(output_reset, "follows output_reset one edge later");
      if (i % 37 == 5) begin
        // asynchronous set in the middle of the low phase
        #2 global_reset = 1'b1;
        #1 check('1, "global reset asynchronous set");
        output_reset = N_OUT'($urandom);
        @(negedge input_clock);
        check('1, "global reset holds all ones");
        global_reset = 1'b0;
        #1 check('1, "no change before the clock edge after release");
        @(negedge input_clock);
        check(output_reset, "follows again after release");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
