// hamming74_decoder: single-error-correcting (7,4) Hamming decoder.
//
// Telemetry channels carry their information as (7,4) Hamming code words
// (n = 2^m - 1 = 7, k = n - m = 4, m = 3 parity bits, minimum distance 3),
// so one wrong bit in every four information bits can be corrected. The
// code word sits in bits [6:0] of the channel byte in the classic order,
// bit i holding code position i+1:
//     position  1  2  3  4  5  6  7
//     bit       p1 p2 d1 p4 d2 d3 d4
// with p1 = d1^d2^d4, p2 = d1^d3^d4, p4 = d2^d3^d4; bit 7 is not used.
// The syndrome {s4,s2,s1} is the position of a single wrong bit (0 = none);
// that bit is inverted and data = {d4,d3,d2,d1} is taken from the result.
// Purely combinational. The (7,4) code is the specified one; the bit
// placement inside the byte is this design's choice.
module hamming74_decoder (
  input  logic [7:0] code,
  output logic [3:0] data,
  output logic [2:0] syndrome,
  output logic       corrected   // a single-bit error was found and fixed
);
  logic [6:0] fixed;

  always_comb begin
    syndrome[0] = code[0] ^ code[2] ^ code[4] ^ code[6];  // positions 1,3,5,7
    syndrome[1] = code[1] ^ code[2] ^ code[5] ^ code[6];  // positions 2,3,6,7
    syndrome[2] = code[3] ^ code[4] ^ code[5] ^ code[6];  // positions 4,5,6,7
    fixed = code[6:0];
    if (syndrome != 3'd0) fixed[syndrome - 3'd1] = ~code[syndrome - 3'd1];
    corrected = (syndrome != 3'd0);
    data = {fixed[6], fixed[5], fixed[4], fixed[2]};
  end
endmodule
