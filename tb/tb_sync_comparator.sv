// tb_sync_comparator: applies shift-register words that do and do not
// equal the SYNC word, with and without a bit strobe, and checks the
// registered one-cycle sync_detect pulse.
module tb_sync_comparator;
  logic clk = 0, rst_n = 0, bit_strobe = 0, sync_detect;
  logic [15:0] word = 0, sync_word = 16'hEB90;
  int checks = 0, failures = 0, hits = 0;
  initial begin rst_n = 1; #1 rst_n = 0; end  // falling edge: async reset
  always #5 clk = ~clk;
  sync_comparator #(.WIDTH(16)) dut (.*);
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic expect_hit;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      if (i % 100 == 50) sync_word = 16'($urandom);
      bit_strobe = 1'($urandom);
      word = ($urandom_range(0, 3) == 0) ? sync_word : 16'($urandom);
      // single bit difference must not match
      if (i % 7 == 3) word = sync_word ^ (16'd1 << (i % 16));
      expect_hit = bit_strobe && (word == sync_word);
      @(posedge clk); #1;
      checks++;
      if (sync_detect !== expect_hit) begin failures++; $display("err %h %h %b", word, sync_word, bit_strobe); end
      if (expect_hit) hits++;
    end
    checks++; if (hits < 50) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
