// pcm_decoder_top: dual-code (NRZ / Manchester) PCM telemetry decoder with
// an ISA bus interface.
//
// Three parts, tied together here:
//   * data extraction: recovers bits from the serial line, finds the
//     16-bit SYNC word, checks the start/stop bits of each of the 32
//     11-bit channels, latches each channel byte and requests IRQ5;
//     counts channels and frames;
//   * operation timer: ends the operation after a programmed time and
//     requests IRQ7;
//   * ISA interface: register map at 0x300, control and status, IRQ lines.
// The status register and the 5 x 8 read multiplexer combine signals from
// all three. A (7,4) Hamming decoder of the latched channel byte is brought
// out on its own pins (`ham_*`); the ISA register map is unchanged by it.
//
// Clocking: one clock `clk` (8 MHz by default) for everything, ISA bus
// strobes sampled synchronously. CLKS_PER_BIT sets the oversampling of the
// serial line (40 gives 200 kbit/s at 8 MHz) and TICK_DIV the 1 ms base
// tick of the operation timer. Reset `rst_n` is asynchronous, active low.
// The three-part structure, register map and interrupts follow the
// specification; clock, oversampling and tick rates are this design's.
module pcm_decoder_top #(
  parameter int unsigned CLKS_PER_BIT = 40,
  parameter int unsigned TICK_DIV     = 8000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        rx_in,        // PCM serial stream
  // ISA bus
  input  logic        isa_aen_n,
  input  logic        isa_ior_n,
  input  logic        isa_iow_n,
  input  logic [11:0] isa_addr,
  input  logic [7:0]  isa_data_in,
  output logic [7:0]  isa_data_out,
  output logic        isa_data_oe,  // drive the data bus (EN_OUT)
  output logic        irq5,
  output logic        irq7,
  // observation points
  output logic        g_clock,      // recovered bit strobe
  output logic        g_data,       // recovered bit
  output logic        ch_gate,      // high while channels are extracted
  output logic        op_time_flag,
  output logic [3:0]  ham_data,     // Hamming-corrected nibble of the channel byte
  output logic        ham_corrected
);
  import pcm_pkg::*;

  logic        mode, run, reset_receiver, reset_frame;
  logic [17:0] op_time;
  logic [15:0] sync_word;
  logic        sync_detect, frame_start, byte_ready, framing_error, frame_done;
  logic [7:0]  ch_data, ch_num, frame_lo, frame_hi;
  logic        op_done;
  logic [15:0] op_timer;
  logic        irq5_pending, irq7_pending;
  logic [2:0]  rd_sel;
  logic [7:0]  rd_data;
  logic        rd_frame_lo;
  status_t     status;
  logic [2:0]  ham_syndrome;

  data_extraction #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_dx (
    .clk, .rst_n,
    .clear         (reset_receiver),
    .frame_clear   (reset_frame),
    .mode, .rx_in, .sync_word,
    .read_frame_lo (rd_frame_lo),
    .bit_valid     (g_clock),
    .bit_data      (g_data),
    .in_frame      (ch_gate),
    .sync_detect, .frame_start, .byte_ready, .framing_error, .frame_done,
    .ch_data, .ch_num, .frame_lo, .frame_hi
  );

  operation_timer #(.TICK_DIV(TICK_DIV)) u_opt (
    .clk, .rst_n, .run, .op_time,
    .op_flag (op_time_flag),
    .done    (op_done),
    .timer   (op_timer)
  );

  isa_interface u_isa (
    .clk, .rst_n,
    .aen_n (isa_aen_n), .ior_n (isa_ior_n), .iow_n (isa_iow_n),
    .addr (isa_addr), .data_in (isa_data_in),
    .data_out (isa_data_out), .data_oe (isa_data_oe),
    .irq5, .irq7,
    .rd_sel, .rd_data, .rd_frame_lo,
    .mode, .run, .reset_receiver, .reset_frame, .op_time, .sync_word,
    .byte_ready, .op_done, .irq5_pending, .irq7_pending
  );

  status_register u_status (
    .clk, .rst_n,
    .clear             (reset_receiver),
    .irq5_pending, .irq7_pending,
    .in_frame          (ch_gate),
    .op_time           (op_time_flag),
    .mode,
    .framing_error_evt (framing_error),
    .byte_ready,
    .status
  );

  read_mux u_mux (
    .sel (rd_sel), .status (status), .channel_num (ch_num),
    .channel_data (ch_data), .frame_lo, .frame_hi, .dout (rd_data)
  );

  hamming74_decoder u_ham (
    .code (ch_data), .data (ham_data), .syndrome (ham_syndrome),
    .corrected (ham_corrected)
  );
endmodule
