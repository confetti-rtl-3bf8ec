// tb_lvds_link_tx: self-checking test of the serial link transmitter.
// A reference model expands every accepted word into its expected line
// symbols (start symbol 11, then the word two bits at a time, MSB first);
// a checker compares the line with that stream on every falling edge and
// expects idle 00 when nothing is due. Words are offered with random gaps
// and then back to back, where one word must leave every WORD_W/2+1 cycles.
module tb_lvds_link_tx;
  localparam int unsigned W = 16;

  logic         clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a falling edge applies the asynchronous resets
  logic         in_valid = 1'b0, in_ready;
  logic [W-1:0] in_data = '0;
  logic         lnk_clk;
  logic [1:0]   lnk_d;
  int           checks = 0, failures = 0;
  logic [1:0]   exp_q[$];
  int           accepts = 0, cycle = 0, first_acc = -1, last_acc = -1;

  lvds_link_tx #(.WORD_W(W)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  // Reference model: an accepted word turns into W/2+1 symbols.
  always @(posedge clk) begin
    if (rst_n && in_valid && in_ready) begin
      exp_q.push_back(2'b11);
      for (int k = W/2 - 1; k >= 0; k--) exp_q.push_back(in_data[2*k +: 2]);
      accepts++;
      if (first_acc < 0) first_acc = cycle;
      last_acc = cycle;
    end
  end

  // Line checker.
  always @(negedge clk) begin
    if (rst_n) begin
      logic [1:0] e;
      e = (exp_q.size() != 0) ? exp_q.pop_front() : 2'b00;
      checks++;
      if (lnk_d !== e) begin
        failures++;
        if (failures < 10) $display("line mismatch at cycle %0d: got %b want %b", cycle, lnk_d, e);
      end
      checks++;
      if (lnk_clk !== clk) failures++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // Random words with random gaps.
    for (int i = 0; i < 40; i++) begin
      @(negedge clk);
      in_valid = 1'b1;
      in_data  = W'($urandom);
      do @(posedge clk); while (!in_ready);
      @(negedge clk) in_valid = 1'b0;
      repeat ($urandom_range(0, 12)) @(negedge clk);
    end
    repeat (12) @(negedge clk);
    // Back-to-back throughput.
    accepts = 0; first_acc = -1;
    @(negedge clk);
    in_valid = 1'b1;
    in_data  = W'($urandom);
    begin
      int seen = 0;
      while (accepts < 20) begin
        @(negedge clk);
        if (accepts != seen) begin
          seen    = accepts;
          in_data = W'($urandom);
        end
      end
    end
    in_valid = 1'b0;
    checks++;
    if (last_acc - first_acc != 19 * (W/2 + 1)) begin
      failures++;
      $display("throughput: 20 words took %0d cycles, want %0d", last_acc - first_acc, 19 * (W/2 + 1));
    end
    repeat (12) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
