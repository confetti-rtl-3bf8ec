// tb_ultrastack: end-to-end test of one UltraStack (6 x 3 grid, reduced
// timeouts, 64-byte ECell configurations, fast display scan).
//
// Around the design the testbench places: a plant model for the six
// converters and the eighteen ERouting FPGA configurations; per node a
// router stand-in (xy_router_model), a flash model, an ECell configuration
// model and the ECell's own end of the data link (a link transmitter and
// receiver on the ECell's clock); and the far ends of every edge link, as a
// neighbouring stack would have them. Every node, every ECell and the EPower
// board run on clocks of different periods.
//
// Sequence and checks:
//  1. power-up through the supervisor to RUN (releases the grid's reset);
//  2. every ECell and the west and north edges send words to random
//     destinations, some beyond the board edge; every word must reach the
//     expected ECell or edge connector exactly once and unchanged;
//  3. all eighteen ECells are configured at once, each from another flash
//     slot, and every configuration byte is compared;
//  4. all ECells paint their display squares; a scanned frame must match;
//  5. with node 0's router stalled, a burst from the west edge must set
//     that link's overflow flag;
//  6. a warm sensor must switch on its zone's fan, then an over-temperature
//     must shut the stack down and put the grid back into reset.
// Each mechanism is counted; one that never happened counts as a failure.
module tb_ultrastack;
  import confetti_pkg::*;
  localparam int unsigned MX = 6, MY = 3, N = MX * MY, W = 16, NT = 2 * N + 9;
  localparam int unsigned CFG_BYTES = 64;
  localparam int unsigned NC = 6, NF = 8;
  localparam int unsigned DISP_HZ = 3 * 100 * 48 * 24;   // 3 cycles per pixel

  int checks = 0, failures = 0;

  // ---------------- clocks ----------------
  logic [N-1:0] clk_node, clk_ecell;
  logic         clk_ep = 1'b0, clk_edge = 1'b0;
  for (genvar n = 0; n < N; n++) begin : g_clk
    initial begin
      clk_node[n] = 1'b0;
      clk_ecell[n] = 1'b0;
    end
    always #(4.5 + 0.07 * n)  clk_node[n]  = ~clk_node[n];
    always #(5.15 + 0.05 * n) clk_ecell[n] = ~clk_ecell[n];
  end
  always #10  clk_ep   = ~clk_ep;
  always #4.8 clk_edge = ~clk_edge;

  // ---------------- DUT ----------------
  logic rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a falling edge applies the asynchronous resets
  logic [MX-1:0] n_tx_clk, s_tx_clk, n_rx_clk, s_rx_clk;
  logic [MX-1:0][1:0] n_tx_d, s_tx_d, n_rx_d, s_rx_d;
  logic [MY-1:0] w_tx_clk, e_tx_clk, w_rx_clk, e_rx_clk;
  logic [MY-1:0][1:0] w_tx_d, e_tx_d, w_rx_d, e_rx_d;
  logic [N-1:0] ec_tx_clk, ec_rx_clk;
  logic [N-1:0][1:0] ec_tx_d, ec_rx_d;
  logic [N-1:0][4:0] ovf, ov, ordy, iv, irdy;
  logic [N-1:0][4:0][W-1:0] od, id;
  logic [N-1:0] cfg_start = '0, cbusy, cok, cerr, frd, frv, pb, ib, cc, cd, dn;
  logic [N-1:0][3:0] cfg_slot;
  logic [N-1:0][20:0] fa;
  logic [N-1:0][7:0] fd;
  logic [N-1:0] dwv = '0, dwr;
  logic [N-1:0][2:0] dwx = '0, dwy = '0;
  logic [N-1:0][23:0] dwc = '0;
  logic pv, pfs;
  logic [5:0] px;
  logic [4:0] py;
  logic [23:0] prgb;
  logic power_on = 1'b0, rout_prog, running, fan_force = 1'b0;
  logic [NC-1:0] conv_en, pgood = '0;
  logic [N-1:0] rout_done = '0;
  logic [NT-1:0][7:0] temp;
  logic [NF-1:0] fan_on;
  sup_state_e sstate;
  fault_e sfault;

  ultrastack #(
    .CFG_BYTES(CFG_BYTES), .CFG_TIMEOUT(3000), .STABLE_CYCLES(20),
    .PGOOD_TIMEOUT(300), .ROUT_TIMEOUT(500), .DISP_CLK_HZ(DISP_HZ)
  ) dut (
    .rst_n(rst_n), .clk_node(clk_node), .clk_epower(clk_ep),
    .north_tx_clk(n_tx_clk), .south_tx_clk(s_tx_clk), .north_tx_d(n_tx_d), .south_tx_d(s_tx_d),
    .north_rx_clk(n_rx_clk), .south_rx_clk(s_rx_clk), .north_rx_d(n_rx_d), .south_rx_d(s_rx_d),
    .west_tx_clk(w_tx_clk), .east_tx_clk(e_tx_clk), .west_tx_d(w_tx_d), .east_tx_d(e_tx_d),
    .west_rx_clk(w_rx_clk), .east_rx_clk(e_rx_clk), .west_rx_d(w_rx_d), .east_rx_d(e_rx_d),
    .ecell_tx_clk(ec_tx_clk), .ecell_tx_d(ec_tx_d), .ecell_rx_clk(ec_rx_clk), .ecell_rx_d(ec_rx_d),
    .lnk_overflow(ovf),
    .rt_out_valid(ov), .rt_out_data(od), .rt_out_ready(ordy),
    .rt_in_valid(iv), .rt_in_data(id), .rt_in_ready(irdy),
    .cfg_start(cfg_start), .cfg_slot(cfg_slot), .cfg_busy(cbusy), .cfg_ok(cok), .cfg_err(cerr),
    .flash_rd(frd), .flash_addr(fa), .flash_rvalid(frv), .flash_rdata(fd),
    .ecell_prog_b(pb), .ecell_init_b(ib), .ecell_cclk(cc), .ecell_din(cd), .ecell_done(dn),
    .disp_wr_valid(dwv), .disp_wr_x(dwx), .disp_wr_y(dwy), .disp_wr_rgb(dwc), .disp_wr_ready(dwr),
    .pix_valid(pv), .pix_frame_start(pfs), .pix_x(px), .pix_y(py), .pix_rgb(prgb),
    .power_on(power_on), .conv_en(conv_en), .pgood(pgood), .rout_prog(rout_prog),
    .rout_done(rout_done), .temp(temp), .fan_force(fan_force), .fan_on(fan_on),
    .sup_state(sstate), .sup_fault(sfault), .running(running)
  );

  // ---------------- plant: converters and ERouting configuration ----------------
  int pg_cnt [NC], rd_cnt [N];
  bit cfg_go = 1'b0;
  int n_powerups = 0, n_shutdowns = 0;
  always @(posedge clk_ep) begin
    for (int i = 0; i < NC; i++) begin
      if (!conv_en[i]) begin pg_cnt[i] = 0; pgood[i] <= 1'b0; end
      else begin pg_cnt[i]++; if (pg_cnt[i] == 10 + 7 * i) pgood[i] <= 1'b1; end
    end
    if (rout_prog) cfg_go = 1'b1;
    if (conv_en == '0) begin cfg_go = 1'b0; rout_done <= '0; end
    for (int i = 0; i < N; i++) begin
      if (!cfg_go) rd_cnt[i] = 0;
      else begin rd_cnt[i]++; if (rd_cnt[i] == 20 + 3 * i) rout_done[i] <= 1'b1; end
    end
  end
  sup_state_e sstate_q = SUP_OFF;
  always @(posedge clk_ep) begin
    if (sstate == SUP_POWER_UP && sstate_q != SUP_POWER_UP) n_powerups++;
    if (sstate == SUP_SHUTDOWN && sstate_q != SUP_SHUTDOWN) n_shutdowns++;
    sstate_q <= sstate;
  end

  // ---------------- scoreboard ----------------
  // Sinks: 0..17 ECells, 18..20 east edge rows, 21..26 south edge columns,
  // 27.. north and west edges (must receive nothing).
  int   exp_sink [int];
  int   next_payload = 0;
  int   n_delivered = 0, n_ovf_words = 0, n_east_out = 0, n_south_out = 0;
  int   n_west_in = 0, n_north_in = 0;

  function automatic int sink_of(input int dx, input int dy, input int src_y);
    if (dx >= int'(MX)) return 18 + src_y;
    if (dy >= int'(MY)) return 21 + dx;
    return dy * MX + dx;
  endfunction

  function automatic logic [W-1:0] new_word(input int src_y);
    int dx, dy, p;
    dx = $urandom_range(0, 7);
    dy = $urandom_range(0, 3);
    p  = next_payload++;
    exp_sink[p] = sink_of(dx, dy, src_y);
    return {3'(dx), 2'(dy), 11'(p)};
  endfunction

  bit armed = 1'b0;   // link ends are out of reset

  task automatic arrive(input int sink, input logic [W-1:0] w);
    int p;
    if (!armed) return;
    p = int'(w[9:0]);
    if (w[10]) begin n_ovf_words++; return; end
    checks++;
    if (!exp_sink.exists(p)) begin
      failures++; $display("sink %0d: unexpected word %h", sink, w);
    end else if (exp_sink[p] != sink) begin
      failures++; $display("word %h went to sink %0d, want %0d", w, sink, exp_sink[p]);
    end else begin
      exp_sink.delete(p);
      n_delivered++;
      if (sink >= 18 && sink < 21) n_east_out++;
      if (sink >= 21 && sink < 27) n_south_out++;
    end
  endtask

  // ---------------- per node: router, flash, ECell ----------------
  logic [N-1:0] stall = '0;
  int           hops [N][5];
  bit           ecell_sending = 1'b0;
  int           ecell_to_send = 10;
  int           cfg_bidx [N];

  function automatic logic [7:0] flash_ref(input logic [20:0] a);
    return 8'(a * 7) ^ 8'(a >> 8) ^ 8'(a >> 17) ^ 8'h5A;
  endfunction

  for (genvar n = 0; n < N; n++) begin : g_node
    xy_router_model #(.X(n % MX), .Y(n / MX), .W(W)) rt (
      .clk(clk_node[n]), .rst_n(running), .stall(stall[n]),
      .in_valid(iv[n]), .in_data(id[n]), .in_ready(irdy[n]),
      .out_valid(ov[n]), .out_data(od[n]), .out_ready(ordy[n]), .sent(hops[n]));

    assign cfg_slot[n] = 4'(n % 16);
    flash_model #(.LAT(2 + n % 5)) fl (
      .clk(clk_node[n]), .rd(frd[n]), .addr(fa[n]), .rvalid(frv[n]), .rdata(fd[n]));
    logic       bv;
    logic [7:0] bo;
    int         brx;
    ecell_cfg_model #(.EXPECT_BYTES(CFG_BYTES), .INIT_DELAY(5 + n)) ec (
      .clk(clk_node[n]), .prog_b(pb[n]), .init_b(ib[n]), .cclk(cc[n]), .din(cd[n]),
      .done(dn[n]), .byte_valid(bv), .byte_out(bo), .bytes_rx(brx));
    always @(posedge clk_node[n]) begin
      if (bv) begin
        checks++;
        if (bo !== flash_ref(21'((n % 16) * 131072 + cfg_bidx[n]))) begin
          failures++; $display("ECell %0d config byte %0d wrong", n, cfg_bidx[n]);
        end
        cfg_bidx[n]++;
      end
    end

    // The ECell's end of its data link.
    logic         etx_v = 1'b0, etx_r, erx_v, erx_ovf;
    logic [W-1:0] etx_d = '0, erx_d;
    int           left;
    lvds_link_tx #(.WORD_W(W)) etx (
      .clk(clk_ecell[n]), .rst_n(rst_n), .in_valid(etx_v), .in_data(etx_d), .in_ready(etx_r),
      .lnk_clk(ec_rx_clk[n]), .lnk_d(ec_rx_d[n]));
    lvds_link_rx #(.WORD_W(W)) erx (
      .clk(clk_ecell[n]), .rst_n(rst_n), .lnk_clk(ec_tx_clk[n]), .lnk_d(ec_tx_d[n]),
      .out_valid(erx_v), .out_data(erx_d), .out_ready(1'b1), .overflow(erx_ovf));
    initial left = 0;
    always @(posedge clk_ecell[n]) begin
      if (erx_v) arrive(n, erx_d);
      if (etx_v && etx_r) etx_v <= 1'b0;
      else if (ecell_sending && left > 0 && !etx_v && $urandom_range(0, 150) == 0) begin
        etx_v <= 1'b1;
        etx_d <= new_word(n / MX);
        left--;
      end
      if (!ecell_sending) left = ecell_to_send;
    end
  end

  // ---------------- far ends of the edge links ----------------
  // Index e: 0..2 west rows, 3..5 east rows, 6..11 north cols, 12..17 south cols.
  logic [17:0]        xe_clk_out, xe_clk_in, xe_v = '0, xe_r, xr_v, xr_ovf;
  logic [17:0][1:0]   xe_d_out, xe_d_in;
  logic [17:0][W-1:0] xe_w = '0, xr_w;
  logic               edge_sending = 1'b0;
  int                 edge_left [18];
  logic               ovf_burst = 1'b0;
  int                 burst_left = 0;

  for (genvar y = 0; y < MY; y++) begin : g_we
    assign w_rx_clk[y] = xe_clk_out[y];      assign w_rx_d[y] = xe_d_out[y];
    assign xe_clk_in[y] = w_tx_clk[y];       assign xe_d_in[y] = w_tx_d[y];
    assign e_rx_clk[y] = xe_clk_out[3 + y];  assign e_rx_d[y] = xe_d_out[3 + y];
    assign xe_clk_in[3 + y] = e_tx_clk[y];   assign xe_d_in[3 + y] = e_tx_d[y];
  end
  for (genvar x = 0; x < MX; x++) begin : g_ns
    assign n_rx_clk[x] = xe_clk_out[6 + x];  assign n_rx_d[x] = xe_d_out[6 + x];
    assign xe_clk_in[6 + x] = n_tx_clk[x];   assign xe_d_in[6 + x] = n_tx_d[x];
    assign s_rx_clk[x] = xe_clk_out[12 + x]; assign s_rx_d[x] = xe_d_out[12 + x];
    assign xe_clk_in[12 + x] = s_tx_clk[x];  assign xe_d_in[12 + x] = s_tx_d[x];
  end

  for (genvar e = 0; e < 18; e++) begin : g_edge
    lvds_link_tx #(.WORD_W(W)) xtx (
      .clk(clk_edge), .rst_n(rst_n), .in_valid(xe_v[e]), .in_data(xe_w[e]), .in_ready(xe_r[e]),
      .lnk_clk(xe_clk_out[e]), .lnk_d(xe_d_out[e]));
    lvds_link_rx #(.WORD_W(W)) xrx (
      .clk(clk_edge), .rst_n(rst_n), .lnk_clk(xe_clk_in[e]), .lnk_d(xe_d_in[e]),
      .out_valid(xr_v[e]), .out_data(xr_w[e]), .out_ready(1'b1), .overflow(xr_ovf[e]));
    localparam int SINK = (e < 3) ? 27 : (e < 6) ? 18 + (e - 3) : (e < 12) ? 27 : 21 + (e - 12);
    localparam bit SOURCE = (e < 3) || (e >= 6 && e < 12);
    localparam int SRC_Y = (e < 3) ? e : 0;
    always @(posedge clk_edge) begin
      if (xr_v[e]) arrive(SINK, xr_w[e]);
      if (xe_v[e] && xe_r[e]) xe_v[e] <= 1'b0;
      else if (!xe_v[e] && e == 0 && ovf_burst && burst_left > 0) begin
        xe_v[e] <= 1'b1;
        xe_w[e] <= {3'd5, 2'd2, 1'b1, 10'(burst_left)};
        burst_left--;
      end else if (SOURCE && edge_sending && edge_left[e] > 0 && !xe_v[e]
                   && $urandom_range(0, 150) == 0) begin
        xe_v[e] <= 1'b1;
        xe_w[e] <= new_word(SRC_Y);
        edge_left[e]--;
        if (e < 3) n_west_in++; else n_north_in++;
      end
    end
  end

  // ---------------- display ----------------
  logic [23:0] ref_img [48 * 24];
  int          painted [N];
  bit          painting = 1'b0, disp_checking = 1'b0, disp_active = 1'b0;
  int          pix_seen = 0, pix_bad = 0;
  bit          acc [N];

  function automatic logic [23:0] colour(input int n, input int x, input int y);
    return {8'(n * 13), 8'(x * 31 + y), 8'(y * 17 + n)};
  endfunction

  always @(posedge clk_ep) begin
    for (int n = 0; n < N; n++) begin
      acc[n] = dwv[n] && dwr[n];
      if (acc[n])
        ref_img[((n / MX) * 8 + int'(dwy[n])) * 48 + (n % MX) * 8 + int'(dwx[n])] = dwc[n];
    end
    if (disp_checking && pv && pfs && pix_seen == 0) disp_active = 1'b1;
    if (disp_active && pv && pix_seen < 48 * 24) begin
      checks++;
      if (int'(py) * 48 + int'(px) != pix_seen || prgb !== ref_img[pix_seen]) begin
        failures++;
        if (pix_bad++ < 5) $display("pixel %0d: (%0d,%0d) %h want %h", pix_seen, px, py, prgb, ref_img[pix_seen]);
      end
      pix_seen++;
    end
  end
  always @(negedge clk_ep) begin
    for (int n = 0; n < N; n++) begin
      if (!dwv[n] || acc[n]) begin
        acc[n] = 1'b0;
        if (painting && painted[n] < 64) begin
          dwv[n] = 1'b1;
          dwx[n] = 3'(painted[n] % 8);
          dwy[n] = 3'(painted[n] / 8);
          dwc[n] = colour(n, painted[n] % 8, painted[n] / 8);
          painted[n]++;
        end else dwv[n] = 1'b0;
      end
    end
  end

  // ---------------- sequence ----------------
  task automatic count(input string what, input int n);
    checks++;
    if (n == 0) begin failures++; $display("mechanism never happened: %s", what); end
    else $display("  %-32s %0d", what, n);
  endtask

  initial begin
    foreach (painted[n]) begin painted[n] = 0; acc[n] = 1'b0; cfg_bidx[n] = 0; end
    foreach (edge_left[e]) edge_left[e] = 5;
    for (int i = 0; i < NT; i++) temp[i] = 8'd35;
    repeat (5) @(posedge clk_ep);
    rst_n = 1'b1;
    repeat (3) @(posedge clk_ep);
    armed = 1'b1;
    // 1. Power-up.
    power_on = 1'b1;
    wait (running);
    checks++;
    if (conv_en != '1) begin failures++; $display("converters not all on in RUN"); end
    repeat (10) @(posedge clk_ep);
    // 2. Traffic.
    ecell_sending = 1'b1;
    edge_sending  = 1'b1;
    repeat (1500) @(posedge clk_ep);
    ecell_sending = 1'b0;
    edge_sending  = 1'b0;
    repeat (300) @(posedge clk_ep);
    checks++;
    if (exp_sink.num() != 0) begin failures++; $display("%0d words not delivered", exp_sink.num()); end
    checks++;
    if (ovf != '0) begin failures++; $display("overflow during paced traffic"); end
    // 3. ECell configuration, all nodes at once.
    @(negedge clk_node[0]) cfg_start = '1;
    repeat (4) @(negedge clk_ep);
    cfg_start = '0;
    repeat (CFG_BYTES * 16 / 2 + 200) @(posedge clk_ep);
    checks++;
    if (cok != '1 || cerr != '0) begin failures++; $display("config ok %b err %b", cok, cerr); end
    foreach (cfg_bidx[n]) begin
      checks++;
      if (cfg_bidx[n] != CFG_BYTES) begin failures++; $display("ECell %0d got %0d bytes", n, cfg_bidx[n]); end
    end
    // 4. Display.
    painting = 1'b1;
    repeat (64 * N + 50) @(posedge clk_ep);
    painting = 1'b0;
    disp_checking = 1'b1;
    repeat (3 * 48 * 24 * 2 + 50) @(posedge clk_ep);
    checks++;
    if (pix_seen != 48 * 24) begin failures++; $display("display: %0d pixels checked", pix_seen); end
    // 5. Link overflow at node 0's west port.
    stall[0] = 1'b1;
    burst_left = 12;
    ovf_burst = 1'b1;
    repeat (200) @(posedge clk_ep);
    checks++;
    if (!ovf[0][PORT_W]) begin failures++; $display("no overflow on node 0 west"); end
    stall[0] = 1'b0;
    repeat (300) @(posedge clk_ep);
    checks++;
    if (n_ovf_words != 1 << 3) begin failures++; $display("%0d burst words delivered, want 8", n_ovf_words); end
    // 6. Thermal: fan zone, then trip.
    temp[20] = 8'd60;                        // sensor 20 is in fan zone 3
    repeat (3) @(posedge clk_ep);
    checks++;
    if (fan_on != 8'b0000_1000) begin failures++; $display("fans %b", fan_on); end
    temp[40] = 8'd90;
    repeat (3) @(posedge clk_ep);
    checks++;
    if (sstate != SUP_SHUTDOWN || sfault != FAULT_TEMP || running || conv_en != '0) begin
      failures++; $display("no thermal shutdown: state %0d fault %0d", sstate, sfault);
    end
    repeat (5) @(posedge clk_ep);
    checks++;
    if (cok != '0) begin failures++; $display("grid not reset after shutdown"); end

    $display("mechanism counts:");
    count("power-up sequences", n_powerups);
    count("shutdowns", n_shutdowns);
    count("words delivered", n_delivered);
    begin
      int h [5];
      h = '{0, 0, 0, 0, 0};
      for (int n = 0; n < N; n++) for (int q = 0; q < 5; q++) h[q] += hops[n][q];
      count("hops north", h[PORT_N]);
      count("hops east", h[PORT_E]);
      count("hops south", h[PORT_S]);
      count("hops west", h[PORT_W]);
      count("deliveries to ECell port", h[PORT_LOCAL]);
    end
    count("words entering from west edge", n_west_in);
    count("words entering from north edge", n_north_in);
    count("words leaving on east edge", n_east_out);
    count("words leaving on south edge", n_south_out);
    begin
      int ncfg = 0;
      foreach (cfg_bidx[n]) if (cfg_bidx[n] == CFG_BYTES) ncfg++;
      count("ECell configurations", ncfg);
    end
    count("display pixels verified", pix_seen);
    count("link overflow words kept", n_ovf_words);
    count("fan switched on", int'(fan_on != '0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk_ep);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
