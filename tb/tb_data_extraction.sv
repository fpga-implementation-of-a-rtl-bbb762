// tb_data_extraction: sends PCM frames from the transmitter model through
// the whole receive path, in NRZ and in Manchester, and checks every
// latched channel byte and channel number against what was sent, the
// frame number, all 256 channel byte values, the framing error on a bad stop bit, that the SYNC word is
// the programmed one, and the channel rate (11 bit periods per byte).
module tb_data_extraction;
  import pcm_pkg::*;
  localparam int unsigned CPB = 40;
  logic clk = 0, rst_n = 0, clear = 0, frame_clear = 0, mode = 0, rx_in;
  logic [15:0] sync_word = DEFAULT_SYNC;
  logic read_frame_lo = 0;
  logic bit_valid, bit_data, in_frame, sync_detect, frame_start, byte_ready;
  logic framing_error, frame_done;
  logic [7:0] ch_data, ch_num, frame_lo, frame_hi;
  int checks = 0, failures = 0, cyc = 0;
  int n_bytes = 0, n_fe = 0, last_byte_t = -1, rate_bad = 0, rate_ok = 0;
  logic [7:0] exp_q [$];
  int exp_num = 0;
  initial begin rst_n = 1; #1 rst_n = 0; end  // falling edge: async reset
  always #5 clk = ~clk;

  pcm_tx_model #(.CLKS_PER_BIT(CPB)) tx (.clk, .line(rx_in));
  data_extraction #(.CLKS_PER_BIT(CPB)) dut (.*);

  always @(posedge clk) begin
    cyc++;
    if (framing_error) n_fe++;
    if (frame_start) exp_num = 0;
    if (byte_ready) begin
      if (last_byte_t >= 0 && exp_num > 0) begin
        if (cyc - last_byte_t == 11 * int'(CPB)) rate_ok++;
        else rate_bad++;
      end
      last_byte_t = cyc;
      exp_num++;
      fork
        begin
          logic [7:0] e;
          int num;
          num = exp_num;
          @(posedge clk); #1;
          n_bytes++;
          checks++;
          e = exp_q.size() ? exp_q.pop_front() : 8'hxx;
          if (ch_data !== e || ch_num !== 8'(num)) begin
            failures++; $display("byte %h exp %h, ch %0d exp %0d", ch_data, e, ch_num, num);
          end
        end
      join_none
    end
  end

  initial begin
    repeat (800000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // base < 0: random channel bytes; otherwise channel c carries base + c
  task automatic frame(input int bad_at, input logic [15:0] sw = DEFAULT_SYNC, input int base = -1);
    tx.send_sync(sw);
    for (int c = 0; c < 32; c++) begin
      logic [7:0] d;
      d = (base < 0) ? 8'($urandom) : 8'(base + c);
      if (c == bad_at) begin tx.send_channel(d, 1); break; end
      if (sw == sync_word) exp_q.push_back(d);
      tx.send_channel(d, 0);
    end
    tx.idle(10);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    tx.idle(10);
    frame(-1);
    frame(-1);
    checks++; if (n_bytes != 64 || frame_lo != 8'd2) begin failures++; $display("nrz %0d %0d", n_bytes, frame_lo); end
    frame(5);
    checks++; if (n_fe != 1 || n_bytes != 69) begin failures++; $display("fe %0d %0d", n_fe, n_bytes); end
    // a frame with another sync word is not accepted
    frame(-1, 16'h1234);
    checks++; if (n_bytes != 69 || frame_lo != 8'd3) begin failures++; $display("wrong sync %0d", n_bytes); end
    // Manchester
    @(negedge clk); mode = 1; clear = 1; tx.manchester = 1; @(negedge clk); clear = 0;
    tx.idle(10);
    frame(-1);
    frame(-1);
    checks++; if (n_bytes != 133 || frame_lo != 8'd5) begin failures++; $display("man %0d %0d", n_bytes, frame_lo); end
    // reprogrammed SYNC word
    sync_word = 16'hFAF3;
    frame(-1, 16'hFAF3);
    checks++; if (n_bytes != 165) begin failures++; $display("new sync %0d", n_bytes); end
    @(negedge clk); frame_clear = 1; @(negedge clk); frame_clear = 0;
    checks++; if (frame_lo != 0 || frame_hi != 0) failures++;
    // every 8-bit channel value, in eight frames, in Manchester
    for (int k = 0; k < 8; k++) frame(-1, 16'hFAF3, 32 * k);
    checks++; if (n_bytes != 165 + 256) begin failures++; $display("all values %0d", n_bytes); end
    checks++; if (rate_bad != 0 || rate_ok < 100) begin failures++; $display("rate ok %0d bad %0d", rate_ok, rate_bad); end
    checks++; if (exp_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
