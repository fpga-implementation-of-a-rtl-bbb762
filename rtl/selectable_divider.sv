// selectable_divider: time base of the operation timer.
//
// A prescaler divides the system clock by TICK_DIV to a base tick
// (1 ms at 8 MHz with the defaults). A second, decade stage divides that
// tick by 1, 10, 100 or 1000, chosen by the two resolution bits of the
// OP_TIME register, giving the timer a step of 1 ms, 10 ms, 100 ms or 1 s
// and a range of about 65 s, 11 min, 1.8 h or 18 h. `tick` is a one-cycle
// strobe. `clear` restarts both stages, so the first tick comes one full
// period after an operation is started. The 2-bit selection of divider
// settings follows the specification; the base tick and the four ratios
// are not given there and are this design's choice.
module selectable_divider #(
  parameter int unsigned TICK_DIV = 8000
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic       enable,
  input  logic [1:0] sel,
  output logic       tick
);
  localparam int unsigned PW = $clog2(TICK_DIV) + 1;

  logic [PW-1:0] pre_cnt;
  logic [9:0]    dec_cnt;
  logic [9:0]    dec_last;
  logic          base_tick;

  always_comb begin
    unique case (sel)
      2'd0:    dec_last = 10'd0;
      2'd1:    dec_last = 10'd9;
      2'd2:    dec_last = 10'd99;
      default: dec_last = 10'd999;
    endcase
  end

  assign base_tick = enable && (pre_cnt == PW'(TICK_DIV - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pre_cnt <= '0;
      dec_cnt <= '0;
      tick    <= 1'b0;
    end else begin
      tick <= 1'b0;
      if (clear) begin
        pre_cnt <= '0;
        dec_cnt <= '0;
      end else if (enable) begin
        pre_cnt <= base_tick ? '0 : pre_cnt + 1'b1;
        if (base_tick) begin
          if (dec_cnt >= dec_last) begin
            dec_cnt <= '0;
            tick    <= 1'b1;
          end else begin
            dec_cnt <= dec_cnt + 1'b1;
          end
        end
      end
    end
  end
endmodule
