// line_decoder: bit-clock and data recovery for the dual-code PCM input.
//
// The decoder accepts either NRZ-L or Manchester (bi-phase-L) serial data
// and switches between them with the `mode` input, which comes from a bit
// of the control register. The received line is sampled by the system
// clock, CLKS_PER_BIT times per bit, after a two-flop synchronizer.
//
//  * NRZ-L: a counter that runs modulo CLKS_PER_BIT is restarted at every
//    transition of the line; the bit is taken half a bit after the last
//    transition (or after the last counter wrap when bits repeat).
//  * Manchester: every bit has a transition in its middle. A transition
//    seen while the blanking counter is idle is taken as a mid-bit edge;
//    the bit is the level just before it (1 = high then low). Transitions
//    are then ignored for 3/4 of a bit, so bit-boundary edges are skipped.
//    If the decoder first locks on a boundary edge it falls onto the
//    mid-bit edges at the first 0-1 or 1-0 pair of bits.
//
// Outputs: `bit_valid` is a one-cycle strobe (the recovered bit clock) with
// `bit_data` valid in the same cycle. Latency from the line is the two
// synchronizer flops plus one register.
// The dual NRZ/Manchester capability and its software-selected mode follow
// the specification; the oversampling recovery method, the ratio
// CLKS_PER_BIT = 40 (8 MHz clock for 200 kbit/s) and the bi-phase-L
// polarity are this design's choices.
module line_decoder #(
  parameter int unsigned CLKS_PER_BIT = 40
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,      // synchronous receiver reset
  input  logic mode,       // pcm_pkg::line_mode_e: 0 NRZ, 1 Manchester
  input  logic rx_in,      // asynchronous serial line
  output logic bit_valid,  // one-cycle strobe per recovered bit
  output logic bit_data
);
  import pcm_pkg::*;

  localparam int unsigned CW = $clog2(CLKS_PER_BIT) + 1;
  localparam logic [CW-1:0] LAST   = CW'(CLKS_PER_BIT - 1);
  localparam logic [CW-1:0] MID    = CW'(CLKS_PER_BIT / 2);
  localparam logic [CW-1:0] BLANK  = CW'((3 * CLKS_PER_BIT) / 4);

  logic [1:0]    sync_q;
  logic          rx_d;
  logic          edge_seen;
  logic [CW-1:0] cnt;

  assign edge_seen = sync_q[1] ^ rx_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync_q    <= 2'b11;
      rx_d      <= 1'b1;
      cnt       <= '0;
      bit_valid <= 1'b0;
      bit_data  <= 1'b0;
    end else begin
      sync_q    <= {sync_q[0], rx_in};
      rx_d      <= sync_q[1];
      bit_valid <= 1'b0;
      if (clear) begin
        cnt <= '0;
      end else if (line_mode_e'(mode) == MODE_NRZ) begin
        if (edge_seen || cnt == LAST) cnt <= '0;
        else                          cnt <= cnt + 1'b1;
        if (!edge_seen && cnt == MID) begin
          bit_valid <= 1'b1;
          bit_data  <= sync_q[1];
        end
      end else begin
        // Manchester: cnt is the blanking counter
        if (cnt != '0) begin
          cnt <= cnt - 1'b1;
        end else if (edge_seen) begin
          cnt       <= BLANK;
          bit_valid <= 1'b1;
          bit_data  <= rx_d;
        end
      end
    end
  end

endmodule
