// data_extraction: the receive path from the serial line to the channel
// byte, the channel number and the frame number.
//
//   rx_in -> line_decoder (NRZ or Manchester) -> 16-bit shift register
//         -> 16-bit comparator against the SYNC word -> byte sync
//            extractor -> 8-bit channel latch (IRQ5), channel counter,
//            frame counter
//
// A recovered bit enters the shift register one cycle after the line
// decoder's strobe; the comparator and the byte sync extractor look at the
// register in the following cycle (`shifted`). `byte_ready` is the IRQ5
// request event and comes 2 clocks after the strobe of a channel's last
// stop bit; `ch_data`, `ch_num` update one clock after it.
// The chain of blocks follows the specified data extraction structure; the
// status register and the 5 x 8 read multiplexer, which that structure
// also contains, sit in the top level because they gather signals from
// the operation timer and the bus interface as well.
module data_extraction #(
  parameter int unsigned CLKS_PER_BIT = 40
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,        // receiver reset
  input  logic        frame_clear,  // frame number reset
  input  logic        mode,
  input  logic        rx_in,
  input  logic [15:0] sync_word,
  input  logic        read_frame_lo,
  output logic        bit_valid,    // recovered bit clock
  output logic        bit_data,     // recovered data
  output logic        in_frame,     // channel gate
  output logic        sync_detect,
  output logic        frame_start,
  output logic        byte_ready,
  output logic        framing_error,
  output logic        frame_done,
  output logic [7:0]  ch_data,
  output logic [7:0]  ch_num,
  output logic [7:0]  frame_lo,
  output logic [7:0]  frame_hi
);
  import pcm_pkg::*;

  logic [SYNC_BITS-1:0] sr;
  logic        shifted;
  logic [15:0] frame_count;

  line_decoder #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_line (
    .clk, .rst_n, .clear, .mode, .rx_in,
    .bit_valid, .bit_data
  );

  sipo_shift_register #(.WIDTH(SYNC_BITS)) u_sr (
    .clk, .rst_n, .clear, .shift_en(bit_valid), .din(bit_data), .q(sr)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) shifted <= 1'b0;
    else        shifted <= bit_valid && !clear;
  end

  sync_comparator #(.WIDTH(SYNC_BITS)) u_cmp (
    .clk, .rst_n, .bit_strobe(shifted), .word(sr), .sync_word, .sync_detect
  );

  byte_sync_extractor u_bse (
    .clk, .rst_n, .clear, .bit_strobe(shifted), .window(sr[10:0]),
    .sync_detect, .in_frame, .frame_start, .byte_ready, .framing_error,
    .frame_done
  );

  channel_latch u_latch (
    .clk, .rst_n, .clear, .load(byte_ready), .d(sr[9:2]), .q(ch_data)
  );

  channel_counter u_chcnt (
    .clk, .rst_n, .clear, .frame_start, .inc(byte_ready), .count(ch_num)
  );

  frame_counter u_frcnt (
    .clk, .rst_n, .clear(frame_clear), .inc(frame_start), .read_lo(read_frame_lo),
    .count(frame_count), .lo_byte(frame_lo), .hi_byte(frame_hi)
  );
endmodule
