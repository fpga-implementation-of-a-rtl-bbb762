// tb_isa_interface: runs ISA I/O cycles against the interface and checks
// the register map: SYNC and OP_TIME bytes, control bits (mode, run,
// enables) and the one-cycle receiver/frame resets, the IRQ request set,
// clear and enable logic, read decode and data-bus enable, and that
// accesses with AEN high or to other addresses do nothing.
module tb_isa_interface;
  import pcm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic aen_n = 1, ior_n = 1, iow_n = 1;
  logic [11:0] addr = 0;
  logic [7:0] data_in = 0, data_out, rd_data;
  logic data_oe, irq5, irq7, rd_frame_lo;
  logic [2:0] rd_sel;
  logic mode, run, reset_receiver, reset_frame;
  logic [17:0] op_time;
  logic [15:0] sync_word;
  logic byte_ready = 0, op_done = 0, irq5_pending, irq7_pending;
  int checks = 0, failures = 0, n_rr = 0, n_rf = 0;
  initial begin rst_n = 1; #1 rst_n = 0; end  // falling edge: async reset
  always #5 clk = ~clk;
  isa_interface dut (.*);
  assign rd_data = {5'b10100, rd_sel};  // marks which select was used
  always @(posedge clk) begin if (reset_receiver) n_rr++; if (reset_frame) n_rf++; end

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic io_write(input logic [11:0] a, input logic [7:0] d, input logic aen = 0);
    @(negedge clk); addr = a; data_in = d; aen_n = aen;
    @(negedge clk); iow_n = 0;
    repeat (3) @(negedge clk);
    iow_n = 1;
    @(negedge clk); aen_n = 1;
    @(negedge clk);
  endtask
  task automatic io_read(input logic [11:0] a, output logic [7:0] d, output logic oe);
    @(negedge clk); addr = a; aen_n = 0;
    @(negedge clk); ior_n = 0;
    repeat (2) @(negedge clk);
    d = data_out; oe = data_oe;
    ior_n = 1;
    @(negedge clk); aen_n = 1;
  endtask
  task automatic chk(input logic c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask
  task automatic pulse_evt(ref logic s);
    @(negedge clk); s = 1; @(negedge clk); s = 0;
  endtask

  initial begin
    logic [7:0] d; logic oe;
    repeat (3) @(posedge clk);
    rst_n = 1;
    chk(sync_word == 16'hEB90 && !run && mode == MODE_NRZ && op_time == 0, "reset values");
    io_write(12'h304, 8'h5A); io_write(12'h305, 8'hC3);
    chk(sync_word == 16'hC35A, "sync word");
    io_write(12'h301, 8'h34); io_write(12'h302, 8'h12); io_write(12'h303, 8'hFE);
    chk(op_time == {2'b10, 16'h1234}, "op time");
    io_write(12'h304, 8'h00, 1);   // AEN high: DMA cycle, ignored
    io_write(12'h704, 8'h00);      // other address, ignored
    chk(sync_word == 16'hC35A, "ignored writes");
    io_write(12'h300, 8'b1001_1100);  // Manchester, en7, en5, run
    chk(mode == MODE_MANCHESTER && run, "control levels");
    chk(n_rr == 0 && n_rf == 0, "no reset pulses yet");
    io_write(12'h300, 8'b1001_1111);  // + reset receiver + reset frame
    chk(n_rr == 1 && n_rf == 1 && !reset_receiver && !reset_frame, "reset pulses");
    // interrupts
    pulse_evt(byte_ready);
    chk(irq5_pending && irq5 && !irq7, "irq5 set");
    pulse_evt(op_done);
    chk(irq7_pending && irq7, "irq7 set");
    io_write(12'h300, 8'b1011_1100);  // clear irq5
    chk(!irq5_pending && !irq5 && irq7, "irq5 cleared");
    io_write(12'h300, 8'b1100_0100);  // clear irq7, disable both
    chk(!irq7_pending && !irq7, "irq7 cleared");
    pulse_evt(byte_ready);
    chk(irq5_pending && !irq5, "irq5 masked but pending");
    io_write(12'h300, 8'b0010_0000);
    chk(!irq5_pending && !run && mode == MODE_NRZ, "stop and NRZ");
    // reads
    for (int a = 0; a < 8; a++) begin
      io_read(12'h300 + 12'(a), d, oe);
      if (a <= 4) chk(oe && d == {5'b10100, 3'(a)}, $sformatf("read %0d", a));
      else        chk(!oe && d == 0, $sformatf("no read %0d", a));
    end
    io_read(12'h200, d, oe);
    chk(!oe, "other address read");
    // frame-low read strobe
    @(negedge clk); addr = 12'h303; aen_n = 0; ior_n = 0; #1;
    chk(rd_frame_lo, "frame low strobe");
    @(negedge clk); ior_n = 1; aen_n = 1; #1;
    chk(!rd_frame_lo && !data_oe, "read ends");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
