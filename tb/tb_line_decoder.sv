// tb_line_decoder: sends a preamble and 200 random bits in NRZ and then in
// Manchester (also with a transmitter running one clock per bit slow) and
// checks that the recovered bit sequence contains the sent payload in
// order, and that recovered bits come once per CLKS_PER_BIT clocks.
module tb_line_decoder;
  localparam int unsigned CPB = 40;
  localparam int N = 200;
  logic clk = 0, rst_n = 0, clear = 0, mode = 0, rx_in, bit_valid, bit_data;
  int checks = 0, failures = 0;
  logic sent [N];
  logic got [$];
  int last_t = -1, gaps_bad = 0, cyc = 0;
  initial begin rst_n = 1; #1 rst_n = 0; end  // falling edge: async reset
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  pcm_tx_model #(.CLKS_PER_BIT(CPB)) tx (.clk, .line(rx_in));
  line_decoder #(.CLKS_PER_BIT(CPB)) dut (.*);

  always @(posedge clk) if (bit_valid) got.push_back(bit_data);

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run(input logic man, input int skew);
    int found;
    got.delete();
    tx.manchester = man; tx.period_skew = skew;
    @(negedge clk); mode = man; clear = 1; @(negedge clk); clear = 0;
    tx.idle(8);
    for (int i = 0; i < N; i++) sent[i] = 1'($urandom);
    for (int i = 0; i < N; i++) tx.send_bit(sent[i]);
    tx.idle(4);
    found = 0;
    for (int s = 0; s + N <= got.size(); s++) begin
      int ok = 1;
      for (int i = 0; i < N; i++) if (got[s + i] !== sent[i]) begin ok = 0; break; end
      if (ok) begin found = 1; break; end
    end
    checks++;
    if (!found) begin failures++; $display("payload not recovered: mode=%0d skew=%0d got=%0d bits", man, skew, got.size()); end
    // about one recovered bit per bit period: 8 + N + 4 sent
    checks++;
    if (got.size() < N || got.size() > N + 14) begin failures++; $display("bit count %0d", got.size()); end
  endtask

  // bit rate: while a constant NRZ 1 is sent, strobes are CPB clocks apart
  task automatic rate_check();
    int t0, n;
    tx.manchester = 0; tx.period_skew = 0;
    @(negedge clk); mode = 0;
    fork tx.idle(20); join_none
    repeat (4 * CPB) @(posedge clk);
    @(posedge clk iff bit_valid); t0 = cyc;
    for (int k = 0; k < 5; k++) begin
      @(posedge clk iff bit_valid);
      checks++; if (cyc - t0 != int'(CPB)) begin failures++; $display("period %0d", cyc - t0); end
      t0 = cyc;
    end
    wait fork;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(0, 0);
    run(0, 1);
    run(1, 0);
    run(1, 1);
    run(1, -1);
    rate_check();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
