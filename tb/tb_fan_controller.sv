// tb_fan_controller: self-checking test of the hot-spot fan control.
// A reference model keeps its own on/off state per fan: fan f watches the
// sensors s with f = floor(s*8/45), turns on at 55 C and off at 45 C or
// below. Directed steps first (one hot sensor turns on only its own fan,
// hysteresis holds it on at 50 C, 45 C turns it off, force_all), then
// random temperature sweeps compared cycle by cycle.
module tb_fan_controller;
  localparam int unsigned NF = 8, NT = 45;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a falling edge applies the asynchronous resets
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [NT-1:0][7:0] temp;
  logic               force_all = 1'b0;
  logic [NF-1:0]      fan_on;
  logic [NF-1:0]      ref_state = '0, ref_on = '0;

  fan_controller #(.N_FANS(NF), .N_TEMP(NT)) dut (.*);

  // Reference: per-fan hottest sensor and hysteresis.
  always @(posedge clk) begin
    if (rst_n) begin
      for (int f = 0; f < NF; f++) begin
        int m;
        m = 0;
        for (int s = 0; s < NT; s++)
          if ((s * NF) / NT == f && int'(temp[s]) > m) m = int'(temp[s]);
        if (m >= 55) ref_state[f] <= 1'b1;
        else if (m <= 45) ref_state[f] <= 1'b0;
        ref_on[f] <= force_all || m >= 55 || (ref_state[f] && m > 45);
      end
    end
  end

  always @(negedge clk) begin
    if (rst_n) begin
      checks++;
      if (fan_on !== ref_on) begin
        failures++;
        if (failures < 10) $display("fans %b, want %b", fan_on, ref_on);
      end
    end
  end

  task automatic expect_fans(input logic [NF-1:0] want);
    checks++;
    if (fan_on !== want) begin failures++; $display("directed: fans %b want %b", fan_on, want); end
  endtask

  initial begin
    for (int s = 0; s < NT; s++) temp[s] = 8'd30;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    expect_fans('0);
    temp[20] = 8'd60;                  // 20*8/45 = 3
    repeat (2) @(negedge clk);
    expect_fans(8'b0000_1000);
    temp[20] = 8'd50;
    repeat (2) @(negedge clk);
    expect_fans(8'b0000_1000);
    temp[20] = 8'd45;
    repeat (2) @(negedge clk);
    expect_fans('0);
    temp[44] = 8'd70;                  // last sensor, last fan
    temp[0]  = 8'd56;                  // first sensor, first fan
    repeat (2) @(negedge clk);
    expect_fans(8'b1000_0001);
    force_all = 1'b1;
    repeat (2) @(negedge clk);
    expect_fans('1);
    force_all = 1'b0;
    // Random sweeps.
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      for (int s = 0; s < NT; s++)
        if ($urandom_range(0, 7) == 0) temp[s] = 8'($urandom_range(35, 65));
      force_all = ($urandom_range(0, 50) == 0);
    end
    repeat (2) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
