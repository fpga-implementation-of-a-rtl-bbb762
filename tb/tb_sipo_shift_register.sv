// tb_sipo_shift_register: drives random bits with random shift enables and
// compares the parallel output with a reference shift model every cycle;
// also checks the clear input.
module tb_sipo_shift_register;
  logic clk = 0, rst_n = 0, clear = 0, shift_en = 0, din = 0;
  logic [15:0] q, model;
  int checks = 0, failures = 0;
  initial begin rst_n = 1; #1 rst_n = 0; end  // falling edge: async reset
  always #5 clk = ~clk;
  sipo_shift_register #(.WIDTH(16)) dut (.*);
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    model = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      shift_en = $urandom_range(0, 2) != 0;
      din = 1'($urandom);
      clear = (i == 250);
      @(posedge clk); #1;
      if (clear) model = '0;
      else if (shift_en) model = {model[14:0], din};
      checks++;
      if (q !== model) begin failures++; $display("mismatch %h %h", q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
