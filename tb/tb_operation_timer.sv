// tb_operation_timer: starts operations with several end times and
// resolutions and checks that the OP_TIME flag stays high for exactly
// end_time x ratio x TICK_DIV clocks, that `done` (IRQ7) pulses once at the
// end, that the timer value counts the steps, and that clearing `run`
// stops an operation without `done`. The flag falls one clock after the
// last divider period, because the divider starts the cycle after `run`.
module tb_operation_timer;
  localparam int unsigned TICK_DIV = 4;
  logic clk = 0, rst_n = 0, run = 0, op_flag, done;
  logic [17:0] op_time = 0;
  logic [15:0] timer;
  int checks = 0, failures = 0, n_done = 0, cyc = 0;
  int ratio [4] = '{1, 10, 100, 1000};
  initial begin rst_n = 1; #1 rst_n = 0; end  // falling edge: async reset
  always #5 clk = ~clk;
  always @(posedge clk) begin cyc++; if (done) n_done++; end
  operation_timer #(.TICK_DIV(TICK_DIV)) dut (.*);

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic one_op(input logic [1:0] res, input logic [15:0] t_end);
    int t0, len, d0;
    @(negedge clk); op_time = {res, t_end}; run = 1;
    @(posedge clk); #1; t0 = cyc; d0 = n_done;
    checks++; if (!op_flag) failures++;
    while (op_flag) begin @(posedge clk); #1; end
    len = cyc - t0;
    checks++;
    if (len != int'(t_end) * ratio[res] * int'(TICK_DIV) + 1) begin
      failures++; $display("res %0d end %0d: length %0d", res, t_end, len);
    end
    @(posedge clk); #1;
    checks++; if (n_done != d0 + 1) begin failures++; $display("done count"); end
    checks++; if (timer != t_end) begin failures++; $display("timer %0d", timer); end
    @(negedge clk); run = 0;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    int d0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    one_op(0, 5);
    one_op(0, 1);
    one_op(1, 7);
    one_op(2, 3);
    one_op(3, 2);
    one_op(0, 300);
    // stop before the end: no done
    d0 = n_done;
    @(negedge clk); op_time = {2'd0, 16'd100}; run = 1;
    repeat (50) @(negedge clk);
    checks++; if (!op_flag) failures++;
    run = 0;
    @(negedge clk);
    checks++; if (op_flag) failures++;
    repeat (1000) @(negedge clk);
    checks++; if (n_done != d0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
