// tb_pulse_nco: self-checking test of the accumulator pulse NCO.
// For random increments it checks that a pulse ends on exactly the enabled
// edge number N = ceil(2^ACC_W / increment) after it started (worked out
// here by integer division, not by accumulation), that out_n is low in
// between, that overflow is high exactly in the cycle before the ending
// edge, and that disabled cycles (clk_en low) neither advance the count nor
// end the pulse. Reset in the middle of a pulse is checked too.
module tb_pulse_nco;
  localparam int ACC_W = 16;
  localparam longint FULL = 64'd1 << ACC_W;

  logic             clk = 1'b0;
  logic             rst;
  logic             clk_en;
  logic [ACC_W-1:0] increment;
  logic             out_n;
  logic             overflow;
  int checks = 0, failures = 0;
  int pulses = 0;

  pulse_nco #(.ACC_W(ACC_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic expect_eq(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %b expected %b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_exp, k, gaps;
    rst = 1'b1;
    clk_en = 1'b0;
    increment = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    expect_eq(out_n, 1'b1, "idle after reset");
    for (int t = 0; t < 300; t++) begin
      // pulse lengths from 1 to 60 enabled edges, plus a few extremes
      case (t)
        0: increment = '1;
        1: increment = 16'd1 << (ACC_W - 1);
        2: increment = 16'd1024;
        default: increment = ACC_W'($urandom_range(FULL / 60, FULL - 1));
      endcase
      n_exp = int'((FULL + longint'(increment) - 1) / longint'(increment));
      k = 0;
      gaps = 0;
      // run the pulse; clk_en is dropped now and then
      while (1) begin
        clk_en = ($urandom_range(0, 4) != 0);
        if (!clk_en) gaps++;
        #1;
        expect_eq(overflow, clk_en && (k + 1 == n_exp), "overflow before edge");
        @(negedge clk);
        if (clk_en) k++;
        if (k == n_exp) begin
          expect_eq(out_n, 1'b1, "pulse ends on edge N");
          pulses++;
          break;
        end else begin
          expect_eq(out_n, (k == 0) ? 1'b1 : 1'b0, "pulse active");
        end
      end
      clk_en = 1'b0;
      repeat ($urandom_range(0, 3)) begin
        @(negedge clk);
        expect_eq(out_n, 1'b1, "idle between pulses");
      end
    end
    // reset in the middle of a long pulse
    increment = 16'd1000;
    clk_en = 1'b1;
    repeat (10) @(negedge clk);
    expect_eq(out_n, 1'b0, "long pulse running");
    rst = 1'b1;
    #1 expect_eq(out_n, 1'b1, "reset ends pulse at once");
    @(negedge clk);
    rst = 1'b0;
    k = 0;
    n_exp = int'((FULL + 999) / 1000);
    while (k < n_exp) begin
      @(negedge clk);
      k++;
      expect_eq(out_n, (k == n_exp) ? 1'b1 : 1'b0, "full pulse after reset");
    end
    checks++;
    if (pulses != 300) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
