// tb_top_modul: self-checking test of the multi-output counter NCO (reset
// register plus four dividers). Every input_clock cycle each output is
// compared with the closed-form expectation
//     output_clk[i] = ((k-1) mod D_i) < floor(D_i/2)
// where k counts the running edges of output i; the per-output reset the
// dividers see is output_reset delayed by one edge, or all ones while
// global_reset is high. Random ratios, enables, per-output resets and
// global resets are applied.
module tb_top_modul;
  localparam int N_OUT = 4;
  localparam int DIV_W = 4;

  logic                   input_clock = 1'b0;
  logic                   global_reset;
  logic [N_OUT-1:0]       output_reset;
  logic [N_OUT-1:0]       enable;
  logic [N_OUT*DIV_W-1:0] freq_divider;
  logic [N_OUT-1:0]       output_clk;
  int checks = 0, failures = 0;
  int n_global = 0, n_out_reset = 0;

  top_modul #(.N_OUT(N_OUT), .DIV_W(DIV_W)) dut (.*);

  always #10 input_clock = ~input_clock;

  logic [N_OUT-1:0] rq;  // reference of the registered reset
  int k [N_OUT];
  always @(posedge input_clock or posedge global_reset) begin
    if (global_reset) rq <= '1;
    else              rq <= output_reset;
  end
  always @(posedge input_clock) begin
    for (int i = 0; i < N_OUT; i++) begin
      if (enable[i] && !rq[i] && int'(freq_divider[DIV_W*i +: DIV_W]) >= 2) k[i] <= k[i] + 1;
      else                                                                   k[i] <= 0;
    end
  end

  function automatic logic expected(int i);
    int d;
    d = int'(freq_divider[DIV_W*i +: DIV_W]);
    if (k[i] == 0 || d < 2) return 1'b0;
    return ((k[i] - 1) % d) < (d / 2);
  endfunction

  task automatic run(input int cycles);
    repeat (cycles) begin
      @(negedge input_clock);
      for (int i = 0; i < N_OUT; i++) begin
        checks++;
        if (output_clk[i] !== expected(i)) begin
          failures++;
          if (failures < 20)
            $display("FAIL output %0d = %b expected %b at %0t", i, output_clk[i], expected(i), $time);
        end
      end
    end
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge input_clock);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N_OUT; i++) k[i] = 0;
    global_reset = 1'b1;
    output_reset = '0;
    enable = '0;
    freq_divider = '0;
    repeat (2) @(negedge input_clock);
    global_reset = 1'b0;
    enable = 4'b0011;
    freq_divider = {4'd0, 4'd0, 4'd2, 4'd10};
    run(80);
    for (int n = 0; n < 200; n++) begin
      int pick;
      pick = $urandom_range(0, N_OUT - 1);
      case ($urandom_range(0, 5))
        0: begin
             output_reset[pick] = ~output_reset[pick];
             n_out_reset++;
           end
        1: begin
             global_reset = 1'b1;
             n_global++;
             run(1);
             global_reset = 1'b0;
           end
        default: begin
             enable[pick] = 1'b0;
             run(1);
             freq_divider[DIV_W*pick +: DIV_W] = DIV_W'($urandom);
             enable = N_OUT'($urandom) | (N_OUT'(1) << pick);
           end
      endcase
      run($urandom_range(1, 40));
    end
    checks++;
    if (n_global == 0 || n_out_reset == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
