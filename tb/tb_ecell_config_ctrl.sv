// tb_ecell_config_ctrl: self-checking test of the ECell configuration loader.
// Three controllers share one clock. The first loads slot 3 and then slot 15
// of a flash model into a well-behaved ECell model; every byte the ECell
// takes must equal the flash byte at slot*131072 + i (formula repeated here),
// the count must be CFG_BYTES, and the load must take 16 cycles per byte
// plus a small fixed overhead (CCLK never pauses). The second ECell never
// releases INIT_B and the third never raises DONE: both must end in err.
module tb_ecell_config_ctrl;
  localparam int unsigned CFG_BYTES = 64;
  localparam int unsigned TIMEOUT   = 3000;
  localparam int unsigned PROG      = 50;
  localparam int unsigned INIT_DLY  = 10;
  localparam int unsigned SLOT_B    = 131072;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a falling edge applies the asynchronous resets
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  function automatic logic [7:0] ref_byte(input logic [20:0] a);
    return 8'(a * 7) ^ 8'(a >> 8) ^ 8'(a >> 17) ^ 8'h5A;
  endfunction

  logic [2:0]        start = '0, busy, done, err, frd, rvalid, prog_b, init_b, cclk, din, edone, bv;
  logic [3:0]        slot = '0;
  logic [2:0][20:0]  faddr;
  logic [2:0][7:0]   rdata, bout;
  int                brx[3];

  for (genvar i = 0; i < 3; i++) begin : g
    ecell_config_ctrl #(.CFG_BYTES(CFG_BYTES), .PROG_CYCLES(PROG), .TIMEOUT(TIMEOUT)) dut (
      .clk(clk), .rst_n(rst_n), .start(start[i]), .slot(slot), .busy(busy[i]),
      .done(done[i]), .err(err[i]), .flash_rd(frd[i]), .flash_addr(faddr[i]),
      .flash_rvalid(rvalid[i]), .flash_rdata(rdata[i]), .cfg_prog_b(prog_b[i]),
      .cfg_init_b(init_b[i]), .cfg_cclk(cclk[i]), .cfg_din(din[i]), .cfg_done(edone[i]));
    flash_model #(.LAT(4)) fl (
      .clk(clk), .rd(frd[i]), .addr(faddr[i]), .rvalid(rvalid[i]), .rdata(rdata[i]));
    ecell_cfg_model #(.EXPECT_BYTES(CFG_BYTES), .INIT_DELAY(INIT_DLY),
                      .NEVER_INIT(i == 1), .NEVER_DONE(i == 2)) ec (
      .clk(clk), .prog_b(prog_b[i]), .init_b(init_b[i]), .cclk(cclk[i]), .din(din[i]),
      .done(edone[i]), .byte_valid(bv[i]), .byte_out(bout[i]), .bytes_rx(brx[i]));
  end

  // Byte checker for controller 0.
  int          idx = 0;
  logic [20:0] base = '0;
  always @(posedge clk) begin
    if (bv[0]) begin
      checks++;
      if (bout[0] !== ref_byte(base + 21'(idx))) begin
        failures++;
        if (failures < 10) $display("byte %0d: got %h want %h", idx, bout[0], ref_byte(base + 21'(idx)));
      end
      idx++;
    end
  end

  task automatic load(input int s);
    int t0, cyc;
    idx  = 0;
    base = 21'(s * SLOT_B);
    @(negedge clk) begin slot = 4'(s); start[0] = 1'b1; end
    @(negedge clk) start[0] = 1'b0;
    cyc = 0;
    while (!done[0] && !err[0] && cyc < 10 * TIMEOUT) begin @(negedge clk); cyc++; end
    checks++;
    if (!done[0] || err[0]) begin failures++; $display("slot %0d: done %b err %b", s, done[0], err[0]); end
    checks++;
    if (idx != CFG_BYTES) begin failures++; $display("slot %0d: %0d bytes", s, idx); end
    checks++;
    if (cyc < CFG_BYTES * 16 || cyc > PROG + INIT_DLY + CFG_BYTES * 16 + 40) begin
      failures++;
      $display("slot %0d: load took %0d cycles", s, cyc);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    checks++;
    if (busy !== 3'b000 || prog_b !== 3'b111) failures++;
    load(3);
    load(15);
    // Error cases.
    @(negedge clk) begin slot = 4'd1; start[2:1] = 2'b11; end
    @(negedge clk) start[2:1] = 2'b00;
    repeat (3 * TIMEOUT) @(negedge clk);
    checks++;
    if (!err[1] || done[1] || busy[1]) begin failures++; $display("INIT_B timeout not flagged"); end
    checks++;
    if (!err[2] || done[2] || busy[2]) begin failures++; $display("DONE timeout not flagged"); end
    checks++;
    if (brx[2] != CFG_BYTES) begin failures++; $display("ECell 2 got %0d bytes", brx[2]); end
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
