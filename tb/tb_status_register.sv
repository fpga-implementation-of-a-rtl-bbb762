// tb_status_register: drives the live status inputs at random and checks
// each status bit, the sticky framing-error and overrun bits, and their
// clearing by the receiver reset.
module tb_status_register;
  import pcm_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0;
  logic irq5_pending = 0, irq7_pending = 0, in_frame = 0, op_time = 0, mode = 0;
  logic framing_error_evt = 0, byte_ready = 0;
  status_t status;
  logic fe = 0, ov = 0;
  int checks = 0, failures = 0, n_fe = 0, n_ov = 0;
  initial begin rst_n = 1; #1 rst_n = 0; end  // falling edge: async reset
  always #5 clk = ~clk;
  status_register dut (.*);
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      irq5_pending = 1'($urandom); irq7_pending = 1'($urandom); in_frame = 1'($urandom);
      op_time = 1'($urandom); mode = 1'($urandom);
      framing_error_evt = $urandom_range(0, 30) == 0;
      byte_ready = $urandom_range(0, 10) == 0;
      clear = $urandom_range(0, 60) == 0;
      #1;
      checks++;
      if (status.irq5_pending !== irq5_pending || status.irq7_pending !== irq7_pending ||
          status.in_frame !== in_frame || status.op_time !== op_time || status.mode !== mode ||
          status.framing_error !== fe || status.overrun !== ov || status.reserved !== 1'b0) begin
        failures++; $display("status %b fe=%b ov=%b", status, fe, ov);
      end
      @(posedge clk); #1;
      if (clear) begin fe = 0; ov = 0; end
      else begin
        if (framing_error_evt) begin fe = 1; n_fe++; end
        if (byte_ready && irq5_pending) begin ov = 1; n_ov++; end
      end
    end
    checks++; if (n_fe == 0 || n_ov == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
