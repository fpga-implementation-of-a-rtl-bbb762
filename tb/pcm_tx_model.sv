// pcm_tx_model: behavioural PCM telemetry transmitter for testbenches.
//
// Drives `line` with NRZ-L or Manchester (bi-phase-L, 1 = high then low)
// bits, CLKS_PER_BIT clocks each, clocked by `clk`. A frame is the 16-bit
// sync word, MSB first, then channels of one start bit (0), eight data bits
// MSB first and two stop bits (1). Tasks:
//   send_bit(b), send_sync(word), send_channel(byte, bad_stop), idle(n_bits)
// `manchester` selects the line code and `period_skew` adds clocks to the
// bit period (to check tolerance of a slightly slow transmitter).
module pcm_tx_model #(
  parameter int unsigned CLKS_PER_BIT = 40
) (
  input  logic clk,
  output logic line
);
  logic manchester  = 1'b0;
  int   period_skew = 0;
  int   bits_sent   = 0;

  initial line = 1'b1;

  task automatic send_bit(input logic b);
    int n;
    n = int'(CLKS_PER_BIT) + period_skew;
    if (!manchester) begin
      line = b;
      repeat (n) @(posedge clk);
    end else begin
      line = b;
      repeat (n / 2) @(posedge clk);
      line = ~b;
      repeat (n - n / 2) @(posedge clk);
    end
    bits_sent++;
  endtask

  task automatic send_sync(input logic [15:0] word);
    for (int i = 15; i >= 0; i--) send_bit(word[i]);
  endtask

  task automatic send_channel(input logic [7:0] data, input logic bad_stop);
    send_bit(1'b0);
    for (int i = 7; i >= 0; i--) send_bit(data[i]);
    send_bit(1'b1);
    send_bit(!bad_stop);
  endtask

  // Line idle: NRZ holds 1, Manchester sends alternating bits (a preamble
  // with only mid-bit transitions).
  task automatic idle(input int n_bits);
    for (int i = 0; i < n_bits; i++) begin
      if (manchester) send_bit(1'(i));
      else            send_bit(1'b1);
    end
  endtask
endmodule
