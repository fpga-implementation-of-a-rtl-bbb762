// sipo_shift_register: serial-in, parallel-out register of the received bits.
//
// Each recovered bit (strobe `shift_en`) enters at bit 0 and the older
// bits move towards the MSB, so `q[WIDTH-1]` is the oldest bit held and,
// for data sent MSB first, the register reads as the transmitted word.
// The parallel output feeds both the sync-word comparator and the channel
// byte latch. The 16-bit width is the specified one; the shift direction
// and the clear input (driven by the receiver reset) are this design's.
module sipo_shift_register #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             shift_en,
  input  logic             din,
  output logic [WIDTH-1:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        q <= '0;
    else if (clear)    q <= '0;
    else if (shift_en) q <= {q[WIDTH-2:0], din};
  end
endmodule
