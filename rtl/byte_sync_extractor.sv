// byte_sync_extractor: timing and byte sync extractor of the data path.
//
// Once the sync comparator reports the SYNC word, this controller walks
// through the 32 channels of the frame. Each channel is 11 bits: a start
// bit, eight data bits MSB first and two stop bits. When the 11th bit of a
// channel has entered the shift register (`bit_strobe`, with `window` the
// 11 newest bits, window[10] the oldest) it checks the start and stop bits:
//   * good:  `byte_ready` pulses for one cycle; it loads the 8-bit channel
//            latch from window[9:2] and is the IRQ5 request;
//   * bad:   `framing_error` pulses and the controller drops lock and goes
//            back to searching for the SYNC word.
// After the 32nd channel it also returns to the search. Sync is accepted
// only while searching, so data that looks like the SYNC word inside a
// frame is ignored. `frame_start` pulses when a sync is accepted and
// `in_frame` is high while channels are being extracted (the channel gate).
// The frame format (11 bits per channel, 32 channels) and the checking of
// start and stop bits follow the specification; the start/stop values,
// the bit order and the drop-lock rule on a bad start/stop bit are this
// design's choices.
module byte_sync_extractor (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,        // receiver reset
  input  logic        bit_strobe,   // a new bit is in the shift register
  input  logic [10:0] window,       // 11 newest received bits
  input  logic        sync_detect,
  output logic        in_frame,
  output logic        frame_start,
  output logic        byte_ready,
  output logic        framing_error,
  output logic        frame_done
);
  import pcm_pkg::*;

  typedef enum logic {S_HUNT, S_CHANNEL} state_e;

  state_e     state;
  logic [3:0] bit_cnt;   // bits of the current channel received so far
  logic [4:0] chan_cnt;  // channels of the frame completed so far
  logic       frame_ok;

  assign frame_ok = (window[10] == START_BIT_VALUE) &&
                    (window[1]  == STOP_BIT_VALUE)  &&
                    (window[0]  == STOP_BIT_VALUE);
  assign in_frame = (state == S_CHANNEL);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_HUNT;
      bit_cnt       <= '0;
      chan_cnt      <= '0;
      frame_start   <= 1'b0;
      byte_ready    <= 1'b0;
      framing_error <= 1'b0;
      frame_done    <= 1'b0;
    end else begin
      frame_start   <= 1'b0;
      byte_ready    <= 1'b0;
      framing_error <= 1'b0;
      frame_done    <= 1'b0;
      if (clear) begin
        state    <= S_HUNT;
        bit_cnt  <= '0;
        chan_cnt <= '0;
      end else begin
        unique case (state)
          S_HUNT: begin
            if (sync_detect) begin
              state       <= S_CHANNEL;
              bit_cnt     <= '0;
              chan_cnt    <= '0;
              frame_start <= 1'b1;
            end
          end
          S_CHANNEL: begin
            if (bit_strobe) begin
              if (bit_cnt == 4'(CHANNEL_BITS - 1)) begin
                bit_cnt <= '0;
                if (!frame_ok) begin
                  framing_error <= 1'b1;
                  state         <= S_HUNT;
                end else begin
                  byte_ready <= 1'b1;
                  chan_cnt   <= chan_cnt + 1'b1;
                  if (chan_cnt == 5'(CHANNELS - 1)) begin
                    frame_done <= 1'b1;
                    state      <= S_HUNT;
                  end
                end
              end else begin
                bit_cnt <= bit_cnt + 1'b1;
              end
            end
          end
          default: state <= S_HUNT;
        endcase
      end
    end
  end

endmodule
