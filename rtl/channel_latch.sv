// channel_latch: the 8-bit channel data latch.
//
// Holds the data byte of the most recent channel that passed its start
// and stop bit check, so software can read it at any time until the next
// channel arrives (one channel time, 11 bit periods). `load` is the
// byte-ready strobe of the byte sync extractor (the IRQ5 request); the
// byte is taken from the shift register in that cycle. The latch and its
// IRQ5 load follow the specification; clearing it with the receiver reset
// is this design's choice.
module channel_latch (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic       load,
  input  logic [7:0] d,
  output logic [7:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= '0;
    else if (clear) q <= '0;
    else if (load)  q <= d;
  end
endmodule
