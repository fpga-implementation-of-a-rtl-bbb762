// sync_comparator: frame-sync word detector.
//
// Compares the shift register contents with the SYNC word that software
// stored in the decoder's SYNC register. `sync_detect` is a one-cycle
// pulse, registered, in the cycle after a bit was shifted in that made the
// two words equal, so the pulse follows the last sync bit by one clock.
// Comparing only when a new bit has arrived keeps one match from being
// reported twice. The 16-bit width and the software-loaded word follow the
// specification; the registered one-cycle output is this design's choice.
module sync_comparator #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             bit_strobe,  // a bit entered the shift register last cycle
  input  logic [WIDTH-1:0] word,        // shift register contents
  input  logic [WIDTH-1:0] sync_word,   // SYNC register
  output logic             sync_detect
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sync_detect <= 1'b0;
    else        sync_detect <= bit_strobe && (word == sync_word);
  end
endmodule
