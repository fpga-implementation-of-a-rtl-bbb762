// pcm_pkg: types and constants shared by the PCM telemetry decoder.
//
// Holds the frame format (16-bit sync word followed by 32 channels of
// 11 bits: one start bit, eight data bits sent MSB first, two stop bits),
// the ISA register map at base 0x300, and the packed layouts of the
// control and status bytes. The frame sizes and the register map are the
// ones the decoder is specified with; the bit order inside a channel, the
// bit values of start and stop, and the bit layout of the control and
// status bytes are this design's own choice.
package pcm_pkg;

  // Line code chosen by the control register.
  typedef enum logic {
    MODE_NRZ        = 1'b0,  // NRZ-L: high = 1
    MODE_MANCHESTER = 1'b1   // bi-phase-L: 1 = high then low, 0 = low then high
  } line_mode_e;

  // Frame format
  localparam int unsigned SYNC_BITS        = 16;
  localparam int unsigned CHANNEL_BITS     = 11;  // start + 8 data + 2 stop
  localparam int unsigned CHANNELS         = 32;
  localparam logic [15:0] DEFAULT_SYNC     = 16'hEB90;
  localparam logic        START_BIT_VALUE  = 1'b0;
  localparam logic        STOP_BIT_VALUE   = 1'b1;

  // ISA register map (12-bit I/O addresses)
  localparam logic [11:0] ISA_BASE      = 12'h300;
  // writes
  localparam logic [2:0]  W_CONTROL     = 3'd0;  // control word, clear interrupts
  localparam logic [2:0]  W_OPTIME_LO   = 3'd1;
  localparam logic [2:0]  W_OPTIME_HI   = 3'd2;
  localparam logic [2:0]  W_OPTIME_RES  = 3'd3;  // 2-bit time resolution
  localparam logic [2:0]  W_SYNC_LO     = 3'd4;
  localparam logic [2:0]  W_SYNC_HI     = 3'd5;
  // reads
  localparam logic [2:0]  R_STATUS      = 3'd0;
  localparam logic [2:0]  R_CHANNEL_NUM = 3'd1;
  localparam logic [2:0]  R_CHANNEL_DAT = 3'd2;
  localparam logic [2:0]  R_FRAME_LO    = 3'd3;
  localparam logic [2:0]  R_FRAME_HI    = 3'd4;

  // Control byte written at 0x300 (MSB first in the struct).
  typedef struct packed {
    logic       mode;          // [7] 1 = Manchester, 0 = NRZ
    logic       clear_irq7;    // [6] write 1: clear IRQ7 request
    logic       clear_irq5;    // [5] write 1: clear IRQ5 request
    logic       enable_irq7;   // [4] level: IRQ7 enabled
    logic       enable_irq5;   // [3] level: IRQ5 enabled
    logic       run;           // [2] level: 1 = operation running (start), 0 = stop
    logic       reset_frame;   // [1] write 1: clear the frame number
    logic       reset_receiver;// [0] write 1: reset the channel receiver
  } control_t;

  // Status byte read at 0x300.
  typedef struct packed {
    logic       reserved;      // [7] reads 0
    logic       overrun;       // [6] a byte was latched while IRQ5 was still pending
    logic       framing_error; // [5] a start or stop bit was wrong; lock was dropped
    logic       mode;          // [4] line code in use
    logic       op_time;       // [3] OP_TIME flag: operation running
    logic       in_frame;      // [2] sync found, channels being extracted
    logic       irq7_pending;  // [1]
    logic       irq5_pending;  // [0]
  } status_t;

endpackage
