// tb_hamming74_decoder: encodes all 16 nibbles with an independent (7,4)
// encoder, then checks decoding of each code word without error and with
// each of the 7 single-bit errors (corrected), plus bit 7 being ignored.
module tb_hamming74_decoder;
  logic [7:0] code;
  logic [3:0] data;
  logic [2:0] syndrome;
  logic corrected;
  int checks = 0, failures = 0;
  hamming74_decoder dut (.*);
  function automatic logic [7:0] encode(input logic [3:0] d);
    logic p1, p2, p4;
    p1 = d[0] ^ d[1] ^ d[3];
    p2 = d[0] ^ d[2] ^ d[3];
    p4 = d[1] ^ d[2] ^ d[3];
    return {1'b0, d[3], d[2], d[1], p4, d[0], p2, p1};
  endfunction
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int n = 0; n < 16; n++) begin
      code = encode(4'(n)); #1;
      checks++; if (data !== 4'(n) || corrected) begin failures++; $display("clean %0d", n); end
      code[7] = 1'b1; #1;
      checks++; if (data !== 4'(n) || corrected) failures++;
      for (int b = 0; b < 7; b++) begin
        code = encode(4'(n)) ^ (8'd1 << b); #1;
        checks++;
        if (data !== 4'(n) || !corrected || syndrome !== 3'(b + 1)) begin
          failures++; $display("n=%0d bit=%0d data=%h syn=%0d", n, b, data, syndrome);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
