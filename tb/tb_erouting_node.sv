// tb_erouting_node: self-checking test of one ERouting FPGA's link and
// configuration logic. Two nodes run on unrelated clocks (10 ns and 7.3 ns).
// Node A's east port is cabled to node B's west port in both directions;
// every other port of each node is looped back onto itself. Random words
// are sent on all ports of both nodes; each must arrive, in order and
// unchanged, on the receiving port the cabling predicts. Then B stops
// reading its west port while A keeps sending east, which must raise B's
// overflow flag for that port only. Finally node A loads its ECell from
// slot 7 of its flash; the ECell model must receive the right bytes.
module tb_erouting_node;
  import confetti_pkg::*;
  localparam int unsigned W = 16, NP = 5, CFG_BYTES = 32;

  logic clk_a = 1'b0, clk_b = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a falling edge applies the asynchronous resets
  always #5    clk_a = ~clk_a;
  always #3.65 clk_b = ~clk_b;
  int checks = 0, failures = 0;

  logic [1:0][NP-1:0]              tx_clk, rx_clk, ovf;
  logic [1:0][NP-1:0][1:0]         tx_d, rx_d;
  logic [1:0][NP-1:0]              ov = '0, or_, iv, ir = '0;
  logic [1:0][NP-1:0][W-1:0]       od = '0, id;
  logic [1:0]                      cs = '0, cb, cok, cerr, frd, frv, pb, ib, cc, cd, dn, bv;
  logic [1:0][20:0]                fa;
  logic [1:0][7:0]                 fd, bo;
  int                              brx[2];
  logic                            clk [2];
  assign clk[0] = clk_a;
  assign clk[1] = clk_b;

  for (genvar k = 0; k < 2; k++) begin : g
    erouting_node #(.WORD_W(W), .CFG_BYTES(CFG_BYTES), .CFG_TIMEOUT(2000)) u (
      .clk(clk[k]), .rst_n(rst_n),
      .lnk_tx_clk(tx_clk[k]), .lnk_tx_d(tx_d[k]), .lnk_rx_clk(rx_clk[k]), .lnk_rx_d(rx_d[k]),
      .lnk_overflow(ovf[k]),
      .rt_out_valid(ov[k]), .rt_out_data(od[k]), .rt_out_ready(or_[k]),
      .rt_in_valid(iv[k]), .rt_in_data(id[k]), .rt_in_ready(ir[k]),
      .cfg_start(cs[k]), .cfg_slot(4'd7), .cfg_busy(cb[k]), .cfg_ok(cok[k]), .cfg_err(cerr[k]),
      .flash_rd(frd[k]), .flash_addr(fa[k]), .flash_rvalid(frv[k]), .flash_rdata(fd[k]),
      .ecell_prog_b(pb[k]), .ecell_init_b(ib[k]), .ecell_cclk(cc[k]), .ecell_din(cd[k]),
      .ecell_done(dn[k]));
    flash_model #(.LAT(3)) fl (.clk(clk[k]), .rd(frd[k]), .addr(fa[k]), .rvalid(frv[k]), .rdata(fd[k]));
    ecell_cfg_model #(.EXPECT_BYTES(CFG_BYTES)) ec (
      .clk(clk[k]), .prog_b(pb[k]), .init_b(ib[k]), .cclk(cc[k]), .din(cd[k]), .done(dn[k]),
      .byte_valid(bv[k]), .byte_out(bo[k]), .bytes_rx(brx[k]));
  end

  // Cabling: A.E <-> B.W, everything else looped back.
  always_comb begin
    for (int k = 0; k < 2; k++)
      for (int p = 0; p < NP; p++) begin
        rx_clk[k][p] = tx_clk[k][p];
        rx_d[k][p]   = tx_d[k][p];
      end
    rx_clk[1][PORT_W] = tx_clk[0][PORT_E];  rx_d[1][PORT_W] = tx_d[0][PORT_E];
    rx_clk[0][PORT_E] = tx_clk[1][PORT_W];  rx_d[0][PORT_E] = tx_d[1][PORT_W];
  end

  function automatic int dest_node(input int k, input int p);
    if (k == 0 && p == PORT_E) return 1;
    if (k == 1 && p == PORT_W) return 0;
    return k;
  endfunction
  function automatic int dest_port(input int k, input int p);
    if (k == 0 && p == PORT_E) return PORT_W;
    if (k == 1 && p == PORT_W) return PORT_E;
    return p;
  endfunction

  logic [W-1:0] exp_q [2][NP][$];
  bit           sending = 1'b0;
  int           to_send [2][NP];
  int           received = 0;

  // Senders and receivers, one pair per node, in that node's clock domain.
  for (genvar k = 0; k < 2; k++) begin : g_io
    always @(posedge clk[k]) begin
      for (int p = 0; p < NP; p++) begin
        if (ov[k][p] && or_[k][p])
          exp_q[dest_node(k, p)][dest_port(k, p)].push_back(od[k][p]);
        if (iv[k][p] && ir[k][p]) begin
          checks++;
          received++;
          if (exp_q[k][p].size() == 0) begin
            failures++; $display("node %0d port %0d: unexpected %h", k, p, id[k][p]);
          end else begin
            logic [W-1:0] e;
            e = exp_q[k][p].pop_front();
            if (id[k][p] !== e) begin
              failures++; $display("node %0d port %0d: got %h want %h", k, p, id[k][p], e);
            end
          end
        end
      end
    end
    always @(negedge clk[k]) begin
      for (int p = 0; p < NP; p++) begin
        if (!ov[k][p] || or_[k][p]) begin
          if (sending && to_send[k][p] > 0 && $urandom_range(0, 2) != 0) begin
            ov[k][p] <= 1'b1;
            od[k][p] <= W'($urandom);
            to_send[k][p]--;
          end else ov[k][p] <= 1'b0;
        end
      end
    end
  end

  logic [20:0] base = 21'(7 * 131072);
  int          bidx = 0;
  always @(posedge clk_a) begin
    if (bv[0]) begin
      checks++;
      if (bo[0] !== (8'(base + 21'(bidx)) * 8'd7 ^ 8'((base + 21'(bidx)) >> 8) ^ 8'((base + 21'(bidx)) >> 17) ^ 8'h5A))
        failures++;
      bidx++;
    end
  end

  initial begin
    foreach (to_send[k, p]) to_send[k][p] = 40;
    repeat (4) @(negedge clk_a);
    rst_n = 1'b1;
    ir = '1;
    repeat (4) @(negedge clk_a);
    sending = 1'b1;
    repeat (2000) @(negedge clk_a);
    checks++;
    if (received != 2 * NP * 40) begin failures++; $display("received %0d words", received); end
    foreach (exp_q[k, p]) begin
      checks++;
      if (exp_q[k][p].size() != 0) begin failures++; $display("node %0d port %0d: %0d missing", k, p, exp_q[k][p].size()); end
    end
    checks++;
    if (ovf != '0) begin failures++; $display("spurious overflow %b", ovf); end
    // Overflow on B's west port.
    ir[1][PORT_W] = 1'b0;
    to_send[0][PORT_E] = 12;
    repeat (400) @(negedge clk_a);
    checks++;
    if (ovf[1] != (NP'(1) << PORT_W) || ovf[0] != '0) begin failures++; $display("overflow flags %b", ovf); end
    exp_q[1][PORT_W].delete();
    // ECell configuration.
    @(negedge clk_a) cs[0] = 1'b1;
    @(negedge clk_a) cs[0] = 1'b0;
    repeat (CFG_BYTES * 16 + 400) @(negedge clk_a);
    checks++;
    if (!cok[0] || cerr[0] || bidx != CFG_BYTES) begin
      failures++; $display("config: ok %b err %b bytes %0d", cok[0], cerr[0], bidx);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk_a);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
