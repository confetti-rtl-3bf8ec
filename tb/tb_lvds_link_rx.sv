// tb_lvds_link_rx: self-checking test of the serial link receiver.
// The testbench plays the sending FPGA: it runs its own link clock (4 ns)
// unrelated to the receiver clock (5.3 ns) and drives framed symbols after
// each rising link-clock edge. Received words must come out in order and
// unchanged, each within 8 receiver cycles of its last symbol. With the
// reader stalled, a burst longer than the FIFO must raise the sticky
// overflow flag and deliver exactly the first 2**FIFO_AW words.
module tb_lvds_link_rx;
  localparam int unsigned W  = 16;
  localparam int unsigned AW = 3;

  logic         clk = 1'b0, rst_n = 1'b1, lnk_clk = 1'b0;
  initial #1 rst_n = 1'b0;   // a falling edge applies the asynchronous resets
  logic [1:0]   lnk_d = 2'b00;
  logic         out_valid, out_ready = 1'b0, overflow;
  logic [W-1:0] out_data;
  int           checks = 0, failures = 0;
  logic [W-1:0] sent_q[$];
  realtime      last_sym_t[$];

  lvds_link_rx #(.WORD_W(W), .FIFO_AW(AW)) dut (.*);

  always #2.65 clk = ~clk;
  always #2    lnk_clk = ~lnk_clk;

  task automatic send_word(input logic [W-1:0] w);
    @(posedge lnk_clk) lnk_d <= 2'b11;
    for (int k = W/2 - 1; k >= 0; k--) @(posedge lnk_clk) lnk_d <= w[2*k +: 2];
    sent_q.push_back(w);
    last_sym_t.push_back($realtime);
    @(posedge lnk_clk) lnk_d <= 2'b00;
  endtask

  // Reader: pops whenever out_ready is high, compares with the sent order.
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      checks++;
      if (sent_q.size() == 0) begin
        failures++;
        $display("unexpected word %h", out_data);
      end else begin
        logic [W-1:0] e;
        realtime t0;
        e  = sent_q.pop_front();
        t0 = last_sym_t.pop_front();
        if (out_data !== e) begin
          failures++;
          $display("word mismatch: got %h want %h", out_data, e);
        end
        checks++;
        if ($realtime - t0 > 8 * 5.3 + 10) begin
          failures++;
          $display("latency %0t too long", $realtime - t0);
        end
      end
    end
  end

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (4) @(posedge clk);
    out_ready = 1'b1;
    // Random words, including the start pattern 11 inside data, random gaps.
    for (int i = 0; i < 60; i++) begin
      logic [W-1:0] w;
      w = (i < 2) ? {W{1'b1}} : W'($urandom);
      send_word(w);
      repeat ($urandom_range(0, 5)) @(posedge lnk_clk);
    end
    repeat (20) @(posedge clk);
    checks++;
    if (sent_q.size() != 0 || overflow) begin
      failures++;
      $display("words left %0d, overflow %b", sent_q.size(), overflow);
    end
    // Overflow: stall the reader and send more than the FIFO holds.
    out_ready = 1'b0;
    last_sym_t.delete();
    for (int i = 0; i < (1 << AW) + 3; i++) begin
      logic [W-1:0] w;
      w = W'($urandom);
      @(posedge lnk_clk) lnk_d <= 2'b11;
      for (int k = W/2 - 1; k >= 0; k--) @(posedge lnk_clk) lnk_d <= w[2*k +: 2];
      if (i < (1 << AW)) sent_q.push_back(w);
    end
    @(posedge lnk_clk) lnk_d <= 2'b00;
    repeat (10) @(posedge clk);
    checks++;
    if (!overflow) begin
      failures++;
      $display("overflow flag not raised");
    end
    for (int i = 0; i < (1 << AW); i++) last_sym_t.push_back($realtime);
    @(negedge clk) out_ready = 1'b1;
    repeat (3 << AW) @(posedge clk);
    checks++;
    if (sent_q.size() != 0 || out_valid) begin
      failures++;
      $display("after overflow: %0d words missing, out_valid %b", sent_q.size(), out_valid);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
