// tb_selectable_divider: measures the tick period for each of the four
// resolution settings (expected TICK_DIV x 1, 10, 100, 1000 clocks) and
// checks that disable stops the ticks and clear restarts the period.
module tb_selectable_divider;
  localparam int unsigned TICK_DIV = 8;
  logic clk = 0, rst_n = 0, clear = 0, enable = 0, tick;
  logic [1:0] sel = 0;
  int checks = 0, failures = 0;
  int ratio [4] = '{1, 10, 100, 1000};
  initial begin rst_n = 1; #1 rst_n = 0; end  // falling edge: async reset
  always #5 clk = ~clk;
  selectable_divider #(.TICK_DIV(TICK_DIV)) dut (.*);
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int t0, t1, n;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 4; s++) begin
      @(negedge clk); sel = 2'(s); enable = 1; clear = 1;
      @(negedge clk); clear = 0;
      t0 = 0;
      // clocks from the end of clear to the first tick, then between ticks
      n = 0;
      while (!tick) begin @(posedge clk); #1; n++; end
      checks++; if (n != TICK_DIV * ratio[s]) begin failures++; $display("sel %0d first %0d", s, n); end
      for (int k = 0; k < 3; k++) begin
        n = 0;
        do begin @(posedge clk); #1; n++; end while (!tick);
        checks++; if (n != TICK_DIV * ratio[s]) begin failures++; $display("sel %0d period %0d", s, n); end
      end
    end
    @(negedge clk); enable = 0; sel = 0;
    t1 = 0;
    repeat (100) begin @(posedge clk); #1; if (tick) t1++; end
    checks++; if (t1 != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
