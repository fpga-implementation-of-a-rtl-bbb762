`timescale 1ns/1ps
// tb_pcm_decoder_top: end-to-end test of the PCM decoder at its default
// parameters (8 MHz clock, 40 clocks per bit = 200 kbit/s, 1 ms timer
// step), driven the way the ground computer software drives it:
//   write SYNC word (0x90, 0xEB) and OP_TIME, enable IRQ5 and IRQ7, start;
//   on each IRQ5: clear IRQ5, read channel number and channel data, store;
//   on IRQ7: clear it and stop.
// The transmitter model meanwhile sends frames of 32 Hamming-coded
// channels (some with a single flipped bit): NRZ frames, a frame with a bad
// stop bit, then, after the software switches the line code, Manchester
// frames. The software ignores one IRQ5 to provoke an overrun.
// Checked: every channel byte and number read over the bus against what
// was sent, the Hamming-corrected nibble, the frame number, the channel
// rate (11 bit periods), the status bits, and that IRQ7 comes OP_TIME
// after the start. Each mechanism must occur at least once.
module tb_pcm_decoder_top;
  import pcm_pkg::*;
  localparam int unsigned CPB = 40;        // default of the top
  localparam int unsigned TICK = 8000;     // default of the top
  localparam int unsigned OP_MS = 12;

  logic clk = 0, rst_n = 0, rx_in;
  logic isa_aen_n = 1, isa_ior_n = 1, isa_iow_n = 1;
  logic [11:0] isa_addr = 0;
  logic [7:0] isa_data_in = 0, isa_data_out;
  logic isa_data_oe, irq5, irq7, g_clock, g_data, ch_gate, op_time_flag;
  logic [3:0] ham_data;
  logic ham_corrected;

  int checks = 0, failures = 0, cyc = 0;
  // mechanism counters
  int n_nrz_bytes = 0, n_man_bytes = 0, n_irq5 = 0, n_irq7 = 0, n_fe = 0, n_overrun = 0;
  int n_ham_fix = 0, n_frame_reset = 0, n_rx_reset = 0, n_mode_switch = 0, n_rate = 0;

  logic [7:0] sent [1:16][32];
  logic [3:0] nib  [1:16][32];
  int frames_sent = 0;
  logic cur_mode = MODE_NRZ;
  logic skip_one = 0;
  logic gc_stop = 0;
  int t_start = 0, t_irq7 = 0;

  initial begin rst_n = 1; #1 rst_n = 0; end  // falling edge: async reset
  always #62.5 clk = ~clk;  // 8 MHz (timescale 1ns/1ps below)
  always @(posedge clk) cyc++;

  pcm_tx_model #(.CLKS_PER_BIT(CPB)) tx (.clk, .line(rx_in));
  pcm_decoder_top dut (.*);

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input logic c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s (cycle %0d)", m, cyc); end
  endtask

  // ---- ISA bus cycles (a few clocks each) ----
  semaphore bus = new(1);
  task automatic io_write(input logic [11:0] a, input logic [7:0] d);
    bus.get(1);
    @(negedge clk); isa_addr = a; isa_data_in = d; isa_aen_n = 0;
    @(negedge clk); isa_iow_n = 0;
    repeat (3) @(negedge clk);
    isa_iow_n = 1;
    @(negedge clk); isa_aen_n = 1;
    bus.put(1);
  endtask
  task automatic io_read(input logic [11:0] a, output logic [7:0] d);
    bus.get(1);
    @(negedge clk); isa_addr = a; isa_aen_n = 0;
    @(negedge clk); isa_ior_n = 0;
    repeat (2) @(negedge clk);
    if (!isa_data_oe) begin failures++; checks++; $display("no data enable"); end
    d = isa_data_out;
    isa_ior_n = 1;
    @(negedge clk); isa_aen_n = 1;
    bus.put(1);
  endtask
  function automatic logic [7:0] ctl(input logic clr5, clr7, rr, rf);
    control_t c;
    c = '0;
    c.mode = cur_mode; c.clear_irq7 = clr7; c.clear_irq5 = clr5;
    c.enable_irq7 = 1; c.enable_irq5 = 1; c.run = !gc_stop;
    c.reset_frame = rf; c.reset_receiver = rr;
    return c;
  endfunction

  // ---- Hamming (7,4) encoder, independent of the RTL decoder ----
  function automatic logic [7:0] ham_enc(input logic [3:0] d);
    return {1'b0, d[3], d[2], d[1], d[1] ^ d[2] ^ d[3], d[0], d[0] ^ d[2] ^ d[3], d[0] ^ d[1] ^ d[3]};
  endfunction

  // ---- transmitter side ----
  task automatic send_frame(input int bad_at);
    frames_sent++;
    tx.send_sync(16'hEB90);
    for (int c = 0; c < 32; c++) begin
      logic [3:0] n;
      logic [7:0] w;
      n = 4'($urandom);
      w = ham_enc(n);
      if (c % 3 == 1) w[$urandom_range(0, 6)] ^= 1'b1;  // channel error
      sent[frames_sent][c] = w;
      nib[frames_sent][c] = n;
      if (c == bad_at) begin tx.send_channel(w, 1); break; end
      tx.send_channel(w, 0);
    end
    tx.idle(12);
  endtask

  // ---- ground computer software ----
  int last_irq5_t = -1;
  logic irq5_event;
  assign irq5_event = dut.u_dx.byte_ready;
  initial begin : gc
    logic [7:0] st, chn, chd, flo, fhi;
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (4) @(posedge clk);
    io_write(12'h304, 8'h90);   // sync word low
    io_write(12'h305, 8'hEB);   // sync word high
    io_write(12'h301, 8'(OP_MS)); io_write(12'h302, 8'h00); io_write(12'h303, 8'h00);
    io_write(12'h300, ctl(1, 1, 1, 1));  // reset receiver and frame number, enable, start
    t_start = cyc;
    n_frame_reset++; n_rx_reset++;
    io_read(12'h303, flo);
    chk(flo == 0, "frame number reset");
    forever begin
      @(posedge clk iff (irq5 || irq7));
      if (irq5) begin
        n_irq5++;
        if (skip_one) begin
          // leave this request pending: the next byte overruns it
          skip_one = 0;
          @(posedge clk iff !ch_gate || dut.u_dx.byte_ready);
          @(posedge clk);
        end
        io_write(12'h300, ctl(1, 0, 0, 0));
        io_read(12'h301, chn);
        io_read(12'h302, chd);
        io_read(12'h303, flo);
        chk(chn >= 1 && chn <= 32 && flo >= 1 && flo <= 8'(frames_sent), "channel/frame range");
        if (chn >= 1 && chn <= 32 && flo >= 1 && flo <= 8'(frames_sent)) begin
          chk(chd == sent[flo][chn - 1], $sformatf("frame %0d ch %0d data %h exp %h", flo, chn, chd, sent[flo][chn - 1]));
          chk(ham_data == nib[flo][chn - 1], $sformatf("hamming ch %0d", chn));
          if (ham_corrected) n_ham_fix++;
        end
        if (cur_mode == MODE_NRZ) n_nrz_bytes++; else n_man_bytes++;
      end
      if (irq7) begin
        t_irq7 = cyc;
        n_irq7++;
        io_read(12'h300, st);
        chk(st[1] && !st[3], "status: irq7 pending, op_time flag low");
        gc_stop = 1;
        io_write(12'h300, ctl(0, 1, 0, 0));
        chk(!irq7, "irq7 cleared");
        break;
      end
    end
  end

  // channel rate: consecutive IRQ5 requests of a frame are 11 bit periods
  // apart (ch_num still holds the previous channel when the request rises)
  always @(posedge clk) begin
    if (irq5_event) begin
      if (last_irq5_t >= 0 && dut.u_dx.ch_num != 0) begin
        n_rate++;
        chk(cyc - last_irq5_t == 11 * int'(CPB), $sformatf("channel period %0d", cyc - last_irq5_t));
      end
      last_irq5_t = cyc;
    end
  end

  initial begin : stimulus
    logic [7:0] st;
    wait (rst_n);
    repeat (200) @(posedge clk);
    tx.idle(20);
    send_frame(-1);
    skip_one = 1;                 // software misses one channel
    send_frame(-1);
    send_frame(9);                // bad stop bit in channel 10
    repeat (50) @(posedge clk);
    io_read(12'h300, st);
    chk(st[5], "status framing error");
    chk(st[6], "status overrun");
    if (st[5]) n_fe++;
    if (st[6]) n_overrun++;
    // switch to Manchester; the receiver reset also clears the sticky bits
    cur_mode = MODE_MANCHESTER;
    tx.manchester = 1;
    io_write(12'h300, ctl(0, 0, 1, 0));
    n_mode_switch++; n_rx_reset++;
    io_read(12'h300, st);
    chk(st[4] && !st[5] && !st[6] && st[3], "status after mode switch");
    tx.idle(20);
    send_frame(-1);
    send_frame(-1);
    // no more frames; wait for the end of the operation
    wait (gc_stop);
    repeat (20) @(posedge clk);
    chk(t_irq7 - t_start >= int'(OP_MS * TICK) && t_irq7 - t_start <= int'(OP_MS * TICK) + 20,
        $sformatf("operation time %0d clocks", t_irq7 - t_start));
    chk(!op_time_flag, "operation ended");
    chk(n_nrz_bytes == 32 + 31 + 9, $sformatf("NRZ bytes read %0d", n_nrz_bytes));
    chk(n_man_bytes == 64, $sformatf("Manchester bytes read %0d", n_man_bytes));
    // every mechanism happened
    chk(n_nrz_bytes > 0, "NRZ decoding");
    chk(n_man_bytes > 0, "Manchester decoding");
    chk(n_irq5 > 0, "IRQ5");
    chk(n_irq7 == 1, "IRQ7");
    chk(n_fe > 0, "framing error");
    chk(n_overrun > 0, "overrun");
    chk(n_ham_fix > 0, "Hamming correction");
    chk(n_frame_reset > 0 && n_rx_reset > 1 && n_mode_switch > 0, "resets and mode switch");
    chk(n_rate > 0, "channel rate measured");
    $display("mechanisms: nrz=%0d man=%0d irq5=%0d irq7=%0d fe=%0d overrun=%0d ham_fix=%0d frame_reset=%0d rx_reset=%0d mode_switch=%0d rate=%0d",
             n_nrz_bytes, n_man_bytes, n_irq5, n_irq7, n_fe, n_overrun, n_ham_fix, n_frame_reset, n_rx_reset, n_mode_switch, n_rate);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
