// channel_counter: number of the channel now held in the channel latch.
//
// Cleared to 0 when a frame's sync is accepted (and by the receiver
// reset) and incremented with every byte that is latched, so it reads
// 1 for the first channel after the sync and 32 for the last one of the
// frame. Its value is read by software beside the channel data. That a
// channel counter exists and is readable is specified; counting from 1,
// which matches the software's end-of-frame test "channel = 32", is this
// design's reading.
module channel_counter (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic       frame_start,
  input  logic       inc,
  output logic [7:0] count
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                    count <= '0;
    else if (clear || frame_start) count <= '0;
    else if (inc)                  count <= count + 1'b1;
  end
endmodule
