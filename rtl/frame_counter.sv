// frame_counter: 16-bit frame number, read as a low and a high byte.
//
// Counts every frame whose sync word was accepted, wrapping at 65536.
// Software clears it with the "reset frame number" control bit. The value
// is read one byte at a time; reading the low byte copies the high byte
// into a holding register, so a low-then-high read pair returns one
// consistent 16-bit value even if a frame sync falls between the reads.
// The 16-bit width and the two readable bytes follow the specification;
// the holding register is this design's choice.
module frame_counter (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        inc,
  input  logic        read_lo,    // low byte is being read this cycle
  output logic [15:0] count,
  output logic [7:0]  lo_byte,
  output logic [7:0]  hi_byte
);
  logic [7:0] hi_hold;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count   <= '0;
      hi_hold <= '0;
    end else begin
      if (clear)    count <= '0;
      else if (inc) count <= count + 1'b1;
      if (clear)        hi_hold <= '0;
      else if (read_lo) hi_hold <= count[15:8];
    end
  end

  assign lo_byte = count[7:0];
  assign hi_byte = hi_hold;
endmodule
