// tb_power_supervisor: self-checking test of the UltraStack start-up
// supervisor. Models in the testbench: every converter reports power-good a
// random 10..50 cycles after it is enabled (unless marked broken), and every
// ERouting FPGA reports DONE a random 10..100 cycles after the programming
// pulse (unless configuration is marked broken). Scenarios: a clean start-up
// (with the timing of each step checked), a supply dropping while running,
// a converter that never comes up, configuration that never finishes, an
// over-temperature while running, a temperature just below the limit, a
// hot start and a stack switched off by releasing power_on.
module tb_power_supervisor;
  import confetti_pkg::*;
  localparam int unsigned NC = 6, NR = 18, NT = 45;
  localparam int unsigned STABLE = 20, PG_TO = 200, CFG_TO = 300;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a falling edge applies the asynchronous resets
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic                power_on = 1'b0, rout_prog, running;
  logic [NC-1:0]       conv_en, pgood = '0;
  logic [NR-1:0]       rout_done = '0;
  logic [NT-1:0][7:0]  temp;
  sup_state_e          state;
  fault_e              fault;

  power_supervisor #(.N_CONV(NC), .N_ROUT(NR), .N_TEMP(NT), .STABLE_CYCLES(STABLE),
                     .PGOOD_TIMEOUT(PG_TO), .CFG_TIMEOUT(CFG_TO)) dut (.*);

  // Plant models.
  logic [NC-1:0] broken_conv = '0;
  bit            broken_cfg  = 1'b0;
  int            pg_cnt [NC], cfg_cnt [NR], pg_delay [NC], cfg_delay [NR];
  bit            cfg_go = 1'b0;
  int            cyc = 0, t_all_pg = -1, t_prog = -1, prog_pulses = 0;

  always @(posedge clk) begin
    cyc++;
    for (int i = 0; i < NC; i++) begin
      if (!conv_en[i]) begin pg_cnt[i] = 0; pgood[i] <= 1'b0; end
      else begin
        pg_cnt[i]++;
        if (pg_cnt[i] == pg_delay[i] && !broken_conv[i]) pgood[i] <= 1'b1;
      end
    end
    if (rout_prog) begin cfg_go = 1'b1; prog_pulses++; t_prog = cyc; end
    if (conv_en == '0) begin cfg_go = 1'b0; rout_done <= '0; end
    for (int i = 0; i < NR; i++) begin
      if (!cfg_go) cfg_cnt[i] = 0;
      else begin
        cfg_cnt[i]++;
        if (cfg_cnt[i] == cfg_delay[i] && !broken_cfg) rout_done[i] <= 1'b1;
      end
    end
    if (&pgood && t_all_pg < 0) t_all_pg = cyc;
  end

  task automatic expect_eq(input string what, input int got, input int want);
    checks++;
    if (got != want) begin failures++; $display("%s: got %0d want %0d", what, got, want); end
  endtask

  task automatic power_cycle();
    @(negedge clk) power_on = 1'b0;
    repeat (3) @(negedge clk);
    expect_eq("off state", state, SUP_OFF);
    expect_eq("converters off", conv_en, 0);
    for (int i = 0; i < NC; i++) pg_delay[i] = $urandom_range(10, 50);
    for (int i = 0; i < NR; i++) cfg_delay[i] = $urandom_range(10, 100);
    t_all_pg = -1; t_prog = -1; prog_pulses = 0;
    @(negedge clk) power_on = 1'b1;
  endtask

  task automatic wait_state(input sup_state_e s, input int max);
    int n = 0;
    while (state != s && n < max) begin @(negedge clk); n++; end
  endtask

  initial begin
    temp = '0;
    for (int i = 0; i < NT; i++) temp[i] = 8'(30 + i % 20);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // 1. Clean start-up.
    power_cycle();
    @(negedge clk);
    expect_eq("power-up state", state, SUP_POWER_UP);
    expect_eq("all converters on", conv_en, (1 << NC) - 1);
    wait_state(SUP_RUN, 1000);
    expect_eq("run state", state, SUP_RUN);
    expect_eq("running", running, 1);
    expect_eq("one prog pulse", prog_pulses, 1);
    expect_eq("stable wait", t_prog - t_all_pg, STABLE);
    expect_eq("fault none", fault, FAULT_NONE);
    // 2. Supply drops while running.
    repeat (20) @(negedge clk);
    broken_conv[2] = 1'b1;
    pg_cnt[2] = 0;
    @(negedge clk) pgood[2] = 1'b0;
    repeat (2) @(negedge clk);
    expect_eq("shutdown on pgood loss", state, SUP_SHUTDOWN);
    expect_eq("fault pgood", fault, FAULT_PGOOD);
    expect_eq("all off", conv_en, 0);
    repeat (10) @(negedge clk);
    expect_eq("stays down", state, SUP_SHUTDOWN);
    // 3. Converter 2 never comes up.
    power_cycle();
    wait_state(SUP_SHUTDOWN, 1000);
    expect_eq("pgood timeout", fault, FAULT_PGOOD_TO);
    expect_eq("no prog", prog_pulses, 0);
    broken_conv = '0;
    // 4. Configuration never finishes.
    broken_cfg = 1'b1;
    power_cycle();
    wait_state(SUP_SHUTDOWN, 2000);
    expect_eq("config timeout", fault, FAULT_CFG_TO);
    expect_eq("prog once", prog_pulses, 1);
    broken_cfg = 1'b0;
    // 5. Over-temperature while running; 84 must not trip, 85 must.
    power_cycle();
    wait_state(SUP_RUN, 1000);
    expect_eq("run again", state, SUP_RUN);
    @(negedge clk) temp[40] = 8'd84;
    repeat (5) @(negedge clk);
    expect_eq("84 C keeps running", state, SUP_RUN);
    @(negedge clk) temp[40] = 8'd85;
    repeat (2) @(negedge clk);
    expect_eq("85 C trips", state, SUP_SHUTDOWN);
    expect_eq("fault temp", fault, FAULT_TEMP);
    // 6. Hot at power-up: no start.
    power_cycle();
    repeat (3) @(negedge clk);
    expect_eq("hot start refused", state, SUP_SHUTDOWN);
    // 7. Switched off by releasing power_on while running.
    temp[40] = 8'd40;
    power_cycle();
    wait_state(SUP_RUN, 1000);
    expect_eq("run before switch-off", state, SUP_RUN);
    @(negedge clk) power_on = 1'b0;
    @(negedge clk);
    expect_eq("switched off", state, SUP_OFF);
    expect_eq("converters off at switch-off", conv_en, 0);
    expect_eq("not running", running, 0);
    expect_eq("no fault at switch-off", fault, FAULT_NONE);
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
