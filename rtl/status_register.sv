// status_register: the status byte software reads at 0x300.
//
// Gathers live state from across the decoder (interrupt requests pending,
// frame lock, OP_TIME flag, line code) and two sticky error bits:
//   framing_error  set when a channel's start or stop bit was wrong;
//   overrun        set when a new channel byte was latched while the
//                  previous IRQ5 request was still pending, i.e. software
//                  missed a channel.
// Both sticky bits are cleared by the receiver reset. The output is
// combinational from registers. A readable status word built from points
// inside the decoder is specified; which points, and the bit layout
// (pcm_pkg::status_t), are this design's choice.
module status_register (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             irq5_pending,
  input  logic             irq7_pending,
  input  logic             in_frame,
  input  logic             op_time,
  input  logic             mode,
  input  logic             framing_error_evt,
  input  logic             byte_ready,
  output pcm_pkg::status_t status
);
  logic framing_error_q, overrun_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      framing_error_q <= 1'b0;
      overrun_q       <= 1'b0;
    end else if (clear) begin
      framing_error_q <= 1'b0;
      overrun_q       <= 1'b0;
    end else begin
      if (framing_error_evt)          framing_error_q <= 1'b1;
      if (byte_ready && irq5_pending) overrun_q       <= 1'b1;
    end
  end

  always_comb begin
    status               = '0;
    status.overrun       = overrun_q;
    status.framing_error = framing_error_q;
    status.mode          = mode;
    status.op_time       = op_time;
    status.in_frame      = in_frame;
    status.irq7_pending  = irq7_pending;
    status.irq5_pending  = irq5_pending;
  end
endmodule
