// tb_byte_sync_extractor: feeds a bit stream (noise, sync, 32 channels, a
// frame with a bad stop bit, another good frame) as shift-register strobes
// with a reference sync comparator, and checks every byte_ready against
// the channel byte that was sent, the frame_start / frame_done pulses, the
// framing error, and that bytes come only inside frames.
module tb_byte_sync_extractor;
  import pcm_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, bit_strobe = 0, sync_detect = 0;
  logic [10:0] window;
  logic in_frame, frame_start, byte_ready, framing_error, frame_done;
  logic [15:0] sr = 0;
  int checks = 0, failures = 0;
  logic [7:0] exp_q [$];
  int n_bytes = 0, n_fs = 0, n_fd = 0, n_fe = 0;
  initial begin rst_n = 1; #1 rst_n = 0; end  // falling edge: async reset
  always #5 clk = ~clk;
  assign window = sr[10:0];
  byte_sync_extractor dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) begin
    if (byte_ready) begin
      n_bytes++;
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("unexpected byte %h", sr[9:2]); end
      else begin
        logic [7:0] e;
        e = exp_q.pop_front();
        if (sr[9:2] !== e) begin failures++; $display("byte %h expected %h", sr[9:2], e); end
      end
    end
    if (frame_start) n_fs++;
    if (frame_done) n_fd++;
    if (framing_error) n_fe++;
  end

  task automatic send_bit(input logic b);
    @(negedge clk); sr = {sr[14:0], b}; bit_strobe = 1;
    @(negedge clk); bit_strobe = 0; sync_detect = (sr == DEFAULT_SYNC);
    @(negedge clk); sync_detect = 0;
    repeat (3) @(negedge clk);
  endtask
  task automatic send_channel(input logic [7:0] d, input logic bad);
    send_bit(0);
    for (int i = 7; i >= 0; i--) send_bit(d[i]);
    send_bit(1); send_bit(!bad);
  endtask
  task automatic send_frame(input int bad_at);
    for (int i = 15; i >= 0; i--) send_bit(DEFAULT_SYNC[i]);
    for (int c = 0; c < 32; c++) begin
      logic [7:0] d;
      d = (c % 5 == 1) ? 8'hEB : (c % 5 == 2) ? 8'h90 : 8'($urandom);
      if (c == bad_at) begin send_channel(d, 1); break; end
      exp_q.push_back(d);
      send_channel(d, 0);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 40; i++) send_bit(1'($urandom));
    checks++; if (in_frame && n_fs == 0) failures++;
    send_frame(-1);
    checks++; if (n_bytes != 32 || n_fd != 1 || n_fs != 1) begin failures++; $display("frame1 %0d %0d %0d", n_bytes, n_fd, n_fs); end
    checks++; if (in_frame) failures++;
    for (int i = 0; i < 30; i++) send_bit(1);
    send_frame(7);
    checks++; if (n_fe != 1 || in_frame || n_bytes != 39) begin failures++; $display("bad frame %0d %0d %0d", n_fe, in_frame, n_bytes); end
    for (int i = 0; i < 30; i++) send_bit(1);
    send_frame(-1);
    checks++; if (n_bytes != 71 || n_fd != 2 || n_fs != 3) begin failures++; $display("frame3 %0d %0d %0d", n_bytes, n_fd, n_fs); end
    // receiver reset in the middle of a frame drops lock
    for (int i = 15; i >= 0; i--) send_bit(DEFAULT_SYNC[i]);
    checks++; if (!in_frame) failures++;
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    checks++; if (in_frame) failures++;
    checks++; if (exp_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
