// tb_channel_counter: simulates frames of 32 latched channels and checks
// the counter reads 1..32 through a frame, restarts at each frame start
// and clears on the receiver reset.
module tb_channel_counter;
  logic clk = 0, rst_n = 0, clear = 0, frame_start = 0, inc = 0;
  logic [7:0] count;
  int checks = 0, failures = 0;
  initial begin rst_n = 1; #1 rst_n = 0; end  // falling edge: async reset
  always #5 clk = ~clk;
  channel_counter dut (.*);
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic pulse(ref logic s);
    @(negedge clk); s = 1; @(negedge clk); s = 0;
  endtask
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      pulse(frame_start);
      checks++; if (count !== 0) failures++;
      for (int c = 1; c <= 32; c++) begin
        repeat ($urandom_range(0, 3)) @(negedge clk);
        pulse(inc);
        checks++; if (count !== 8'(c)) begin failures++; $display("ch %0d got %0d", c, count); end
      end
    end
    pulse(clear);
    checks++; if (count !== 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
