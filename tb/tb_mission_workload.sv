`timescale 1ns/1ps
// tb_mission_workload: the reference mission at full scale and default
// parameters: one frame every 10 ms for an operation time of 5 s (OP_TIME =
// 5000 steps of 1 ms), 200 kbit/s NRZ. A software model services every
// IRQ5 (clear, read channel number and data) and checks each byte against
// a known pattern of the frame and channel numbers, then stops on IRQ7.
// Checked: no byte lost or wrong, 500 frames (16000 bytes) read within the
// mission,
// no overrun or framing error in the status byte, and IRQ7 at 5 s.
module tb_mission_workload;
  import pcm_pkg::*;
  localparam int unsigned CPB = 40;
  localparam int unsigned TICK = 8000;
  localparam int unsigned FRAME_CLKS = 80000;   // 10 ms
  localparam int unsigned OP_MS = 5000;

  logic clk = 0, rst_n = 0, rx_in;
  logic isa_aen_n = 1, isa_ior_n = 1, isa_iow_n = 1;
  logic [11:0] isa_addr = 0;
  logic [7:0] isa_data_in = 0, isa_data_out;
  logic isa_data_oe, irq5, irq7, g_clock, g_data, ch_gate, op_time_flag;
  logic [3:0] ham_data;
  logic ham_corrected;
  int checks = 0, failures = 0, bad_bytes = 0;
  longint cyc = 0, t_start = 0, t_irq7 = 0;
  int bytes_read = 0, frames_started = 0;
  logic done = 0;

  initial begin rst_n = 1; #1 rst_n = 0; end  // falling edge: async reset
  always #62.5 clk = ~clk;
  always @(posedge clk) cyc++;

  pcm_tx_model #(.CLKS_PER_BIT(CPB)) tx (.clk, .line(rx_in));
  pcm_decoder_top dut (.*);

  initial begin
    repeat (41_000_000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [7:0] pattern(input int f, input int c);
    return 8'(f * 7 + c * 13 + (f >> 3));
  endfunction

  task automatic io_write(input logic [11:0] a, input logic [7:0] d);
    @(negedge clk); isa_addr = a; isa_data_in = d; isa_aen_n = 0;
    @(negedge clk); isa_iow_n = 0;
    repeat (3) @(negedge clk);
    isa_iow_n = 1;
    @(negedge clk); isa_aen_n = 1;
  endtask
  task automatic io_read(input logic [11:0] a, output logic [7:0] d);
    @(negedge clk); isa_addr = a; isa_aen_n = 0;
    @(negedge clk); isa_ior_n = 0;
    repeat (2) @(negedge clk);
    d = isa_data_out;
    isa_ior_n = 1;
    @(negedge clk); isa_aen_n = 1;
  endtask

  // transmitter: a frame every 10 ms, from the start of the operation
  initial begin
    wait (t_start != 0);
    forever begin
      longint t0;
      t0 = cyc;
      if (t0 < t_start + longint'(OP_MS) * TICK) frames_started++;
      tx.send_sync(16'hEB90);
      for (int c = 0; c < 32; c++) tx.send_channel(pattern(frames_started, c), 0);
      while (cyc < t0 + FRAME_CLKS) @(posedge clk);
    end
  end

  initial begin
    logic [7:0] chn, chd, flo, fhi, st;
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (4) @(posedge clk);
    io_write(12'h301, 8'(OP_MS)); io_write(12'h302, 8'(OP_MS >> 8)); io_write(12'h303, 8'h00);
    io_write(12'h300, 8'h1F);
    t_start = cyc;
    forever begin
      @(posedge clk iff (irq5 || irq7));
      if (irq7) break;
      io_write(12'h300, 8'h3C);
      io_read(12'h301, chn);
      io_read(12'h302, chd);
      io_read(12'h303, flo);
      io_read(12'h304, fhi);
      bytes_read++;
      if (chd !== pattern(int'({fhi, flo}), int'(chn) - 1)) begin
        bad_bytes++;
        if (bad_bytes < 5) $display("frame %0d ch %0d: %h", {fhi, flo}, chn, chd);
      end
    end
    t_irq7 = cyc;
    io_read(12'h300, st);
    io_write(12'h300, 8'h58);  // clear IRQ7, stop
    checks++; if (bad_bytes != 0) begin failures++; $display("%0d wrong bytes", bad_bytes); end
    checks++;
    if (t_irq7 - t_start < longint'(OP_MS) * TICK || t_irq7 - t_start > longint'(OP_MS) * TICK + 20) begin
      failures++; $display("operation time %0d clocks", t_irq7 - t_start);
    end
    checks++; if (frames_started != 500) begin failures++; $display("frames started %0d", frames_started); end
    // the last frame starts at 4.99 s and ends 1.84 ms later, before IRQ7
    checks++; if (bytes_read != 500 * 32) begin failures++; $display("bytes %0d", bytes_read); end
    checks++; if (st[6] || st[5] || !st[1] || st[3]) begin failures++; $display("status %b", st); end
    $display("mission: %0d frames started, %0d bytes read, IRQ7 after %0d clocks", frames_started, bytes_read, t_irq7 - t_start);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
