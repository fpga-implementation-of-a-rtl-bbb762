// operation_timer: mission-duration timer that ends an operation (IRQ7).
//
// The 18-bit OP_TIME register holds the end time in its 16 LSBs and the
// timer resolution in its 2 MSBs. The resolution picks a ratio of the
// selectable divider, whose tick advances a 16-bit precision timer; a
// 16-bit comparator matches the timer against the OP_TIME end time.
//
// Operation: a rising edge of `run` (the start bit of the control
// register) clears the timer and the divider and raises the OP_TIME flag
// (`op_flag`). On every tick the timer counts up; in the cycle after it
// equals OP_TIME[15:0] the flag drops and `done` pulses for one cycle,
// which requests IRQ7. Clearing `run` stops the operation without `done`.
// The operation lasts OP_TIME[15:0] timer steps; an end time of 0 means
// 65536 steps, when the timer wraps. OP_TIME is read live, so it should
// be written before the start.
// Structure (register, divider, timer, comparator, flag, IRQ7) follows the
// specification; the start/stop rule and the end-time-0 case are this
// design's choices.
module operation_timer #(
  parameter int unsigned TICK_DIV = 8000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        run,
  input  logic [17:0] op_time,
  output logic        op_flag,
  output logic        done,
  output logic [15:0] timer
);
  logic run_q, start, tick;

  assign start = run && !run_q;

  selectable_divider #(.TICK_DIV(TICK_DIV)) u_div (
    .clk    (clk),
    .rst_n  (rst_n),
    .clear  (start),
    .enable (op_flag),
    .sel    (op_time[17:16]),
    .tick   (tick)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q   <= 1'b0;
      op_flag <= 1'b0;
      done    <= 1'b0;
      timer   <= '0;
    end else begin
      run_q <= run;
      done  <= 1'b0;
      if (start) begin
        op_flag <= 1'b1;
        timer   <= '0;
      end else if (!run) begin
        op_flag <= 1'b0;
      end else if (op_flag && tick) begin
        timer <= timer + 1'b1;
        if (timer + 16'd1 == op_time[15:0]) begin
          op_flag <= 1'b0;
          done    <= 1'b1;
        end
      end
    end
  end
endmodule
