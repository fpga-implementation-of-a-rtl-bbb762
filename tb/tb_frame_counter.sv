// tb_frame_counter: counts frame pulses and checks the 16-bit value, the
// low byte, the high byte held by a low-byte read, wrap-around at 65536
// and the frame number reset.
module tb_frame_counter;
  logic clk = 0, rst_n = 0, clear = 0, inc = 0, read_lo = 0;
  logic [15:0] count;
  logic [7:0] lo_byte, hi_byte;
  int checks = 0, failures = 0;
  int unsigned model = 0;
  initial begin rst_n = 1; #1 rst_n = 0; end  // falling edge: async reset
  always #5 clk = ~clk;
  frame_counter dut (.*);
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [7:0] lo_seen;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 66000; i++) begin
      @(negedge clk); inc = 1;
      @(posedge clk); #1; inc = 0;
      model = (model + 1) % 65536;
      if (i % 997 == 0 || i > 65530 || model % 256 == 255) begin
        checks++; if (count !== 16'(model)) begin failures++; $display("cnt %h %h", count, model); end
        // read low byte, then a frame arrives, then read high byte
        @(negedge clk); read_lo = 1; lo_seen = lo_byte;
        @(negedge clk); read_lo = 0;
        inc = 1; @(negedge clk); inc = 0;
        @(negedge clk);
        checks++; if (lo_seen !== 8'(model)) failures++;
        checks++; if (hi_byte !== 8'(model >> 8)) begin failures++; $display("hi %h %h", hi_byte, model); end
        model = (model + 1) % 65536;
      end
    end
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    checks++; if (count !== 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
