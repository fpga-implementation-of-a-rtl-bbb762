// tb_read_mux: applies random input bytes and every select value and checks
// the five register bytes reach the output at their addresses, 0 elsewhere.
module tb_read_mux;
  logic [2:0] sel;
  logic [7:0] status, channel_num, channel_data, frame_lo, frame_hi, dout, exp_d;
  int checks = 0, failures = 0;
  read_mux dut (.*);
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 200; i++) begin
      status = 8'($urandom); channel_num = 8'($urandom); channel_data = 8'($urandom);
      frame_lo = 8'($urandom); frame_hi = 8'($urandom);
      sel = 3'(i % 8);
      #1;
      case (sel)
        3'd0: exp_d = status;
        3'd1: exp_d = channel_num;
        3'd2: exp_d = channel_data;
        3'd3: exp_d = frame_lo;
        3'd4: exp_d = frame_hi;
        default: exp_d = 8'h00;
      endcase
      checks++; if (dout !== exp_d) begin failures++; $display("sel %0d %h %h", sel, dout, exp_d); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
