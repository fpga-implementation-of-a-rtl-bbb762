// tb_channel_latch: loads random bytes under random load strobes and checks
// the latch holds the last loaded byte, and that clear empties it.
module tb_channel_latch;
  logic clk = 0, rst_n = 0, clear = 0, load = 0;
  logic [7:0] d = 0, q, model = 0;
  int checks = 0, failures = 0;
  initial begin rst_n = 1; #1 rst_n = 0; end  // falling edge: async reset
  always #5 clk = ~clk;
  channel_latch dut (.*);
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      load = $urandom_range(0, 3) == 0;
      d = 8'($urandom);
      clear = (i == 200);
      @(posedge clk); #1;
      if (clear) model = 0; else if (load) model = d;
      checks++;
      if (q !== model) begin failures++; $display("err %h %h", q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
