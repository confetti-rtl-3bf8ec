// tb_ultrastack_full: one complete operation of an UltraStack with every
// parameter at its default (6 x 3 grid, full 130 952-byte ECell
// configurations, 50 MHz display clock, default supervisor timing).
// The stack is powered up through the supervisor; every ECell sends one
// word to the ECell diagonally opposite on the grid, which must arrive
// unchanged; all eighteen ECells are then configured from their flash slots
// at once (every byte compared, about 2.1 million node cycles); while that
// runs, the ECells paint the display and one full frame is scanned out and
// compared, and the frame period must be 499 968 cycles of the 50 MHz
// clock (100 frames per second). The edge link inputs idle on a running
// clock, as they would behind a terminated connector.
module tb_ultrastack_full;
  import confetti_pkg::*;
  localparam int unsigned MX = 6, MY = 3, N = MX * MY, W = 16, NT = 2 * N + 9;
  localparam int unsigned CFG_BYTES = 130952;

  int checks = 0, failures = 0;

  logic [N-1:0] clk_node;
  logic         clk_ep = 1'b0;
  for (genvar n = 0; n < N; n++) begin : g_clk
    initial clk_node[n] = 1'b0;
    always #(4.5 + 0.07 * n) clk_node[n] = ~clk_node[n];
  end
  always #10 clk_ep = ~clk_ep;

  logic rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a falling edge applies the asynchronous resets
  logic [MX-1:0] n_tx_clk, s_tx_clk;
  logic [MX-1:0][1:0] n_tx_d, s_tx_d;
  logic [MY-1:0] w_tx_clk, e_tx_clk;
  logic [MY-1:0][1:0] w_tx_d, e_tx_d;
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
  logic power_on = 1'b0, rout_prog, running;
  logic [5:0] conv_en, pgood = '0;
  logic [N-1:0] rout_done = '0;
  logic [NT-1:0][7:0] temp;
  logic [7:0] fan_on;
  sup_state_e sstate;
  fault_e sfault;

  ultrastack dut (
    .rst_n(rst_n), .clk_node(clk_node), .clk_epower(clk_ep),
    .north_tx_clk(n_tx_clk), .south_tx_clk(s_tx_clk), .north_tx_d(n_tx_d), .south_tx_d(s_tx_d),
    .north_rx_clk({MX{clk_ep}}), .south_rx_clk({MX{clk_ep}}), .north_rx_d('0), .south_rx_d('0),
    .west_tx_clk(w_tx_clk), .east_tx_clk(e_tx_clk), .west_tx_d(w_tx_d), .east_tx_d(e_tx_d),
    .west_rx_clk({MY{clk_ep}}), .east_rx_clk({MY{clk_ep}}), .west_rx_d('0), .east_rx_d('0),
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
    .rout_done(rout_done), .temp(temp), .fan_force(1'b0), .fan_on(fan_on),
    .sup_state(sstate), .sup_fault(sfault), .running(running)
  );

  // Plant: converters come up 1000 + 100*i cycles after enable; the
  // ERouting FPGAs finish configuring 20 000 + 500*i cycles after PROG.
  int pg_cnt [6], rd_cnt [N];
  bit cfg_go = 1'b0;
  always @(posedge clk_ep) begin
    for (int i = 0; i < 6; i++) begin
      if (!conv_en[i]) begin pg_cnt[i] = 0; pgood[i] <= 1'b0; end
      else begin pg_cnt[i]++; if (pg_cnt[i] == 1000 + 100 * i) pgood[i] <= 1'b1; end
    end
    if (rout_prog) cfg_go = 1'b1;
    for (int i = 0; i < N; i++) begin
      if (!cfg_go) rd_cnt[i] = 0;
      else begin rd_cnt[i]++; if (rd_cnt[i] == 20000 + 500 * i) rout_done[i] <= 1'b1; end
    end
  end

  function automatic logic [7:0] flash_ref(input logic [20:0] a);
    return 8'(a * 7) ^ 8'(a >> 8) ^ 8'(a >> 17) ^ 8'h5A;
  endfunction

  int  cfg_bidx [N];
  int  got_word [N];
  bit  armed = 1'b0, send_now = 1'b0;

  for (genvar n = 0; n < N; n++) begin : g_node
    int hops [5];
    xy_router_model #(.X(n % MX), .Y(n / MX), .W(W)) rt (
      .clk(clk_node[n]), .rst_n(running), .stall(1'b0),
      .in_valid(iv[n]), .in_data(id[n]), .in_ready(irdy[n]),
      .out_valid(ov[n]), .out_data(od[n]), .out_ready(ordy[n]), .sent(hops));
    assign cfg_slot[n] = 4'(n % 16);
    flash_model #(.LAT(4)) fl (
      .clk(clk_node[n]), .rd(frd[n]), .addr(fa[n]), .rvalid(frv[n]), .rdata(fd[n]));
    logic       bv;
    logic [7:0] bo;
    int         brx;
    ecell_cfg_model #(.EXPECT_BYTES(CFG_BYTES), .INIT_DELAY(100)) ec (
      .clk(clk_node[n]), .prog_b(pb[n]), .init_b(ib[n]), .cclk(cc[n]), .din(cd[n]),
      .done(dn[n]), .byte_valid(bv), .byte_out(bo), .bytes_rx(brx));
    always @(posedge clk_node[n]) begin
      if (bv) begin
        checks++;
        if (bo !== flash_ref(21'((n % 16) * 131072 + cfg_bidx[n]))) begin
          failures++;
          if (failures < 10) $display("ECell %0d config byte %0d wrong", n, cfg_bidx[n]);
        end
        cfg_bidx[n]++;
      end
    end

    // ECell end of the data link, on the node's clock.
    localparam int DX = MX - 1 - n % MX, DY = MY - 1 - n / MX;
    logic         etx_v = 1'b0, etx_r, erx_v, erx_ovf;
    logic [W-1:0] erx_d;
    bit           sent = 1'b0;
    lvds_link_tx #(.WORD_W(W)) etx (
      .clk(clk_node[n]), .rst_n(rst_n), .in_valid(etx_v),
      .in_data({3'(DX), 2'(DY), 11'(n)}), .in_ready(etx_r),
      .lnk_clk(ec_rx_clk[n]), .lnk_d(ec_rx_d[n]));
    lvds_link_rx #(.WORD_W(W)) erx (
      .clk(clk_node[n]), .rst_n(rst_n), .lnk_clk(ec_tx_clk[n]), .lnk_d(ec_tx_d[n]),
      .out_valid(erx_v), .out_data(erx_d), .out_ready(1'b1), .overflow(erx_ovf));
    always @(posedge clk_node[n]) begin
      if (etx_v && etx_r) etx_v <= 1'b0;
      else if (send_now && !sent) begin etx_v <= 1'b1; sent = 1'b1; end
      if (armed && erx_v) begin
        checks++;
        // The sender of the word reaching ECell n is the opposite ECell.
        if (erx_d !== {3'(n % MX), 2'(n / MX), 11'(N - 1 - n)}) begin
          failures++; $display("ECell %0d got %h", n, erx_d);
        end
        got_word[n]++;
      end
    end
  end

  // Display: paint, then check one frame and the frame period.
  logic [23:0] ref_img [48 * 24];
  int  painted [N];
  bit  acc [N];
  bit  painting = 1'b0, disp_checking = 1'b0, disp_active = 1'b0;
  int  pix_seen = 0, cyc = 0, t_fs0 = -1, t_fs1 = -1;
  always @(posedge clk_ep) begin
    cyc++;
    for (int n = 0; n < N; n++) begin
      acc[n] = dwv[n] && dwr[n];
      if (acc[n])
        ref_img[((n / MX) * 8 + int'(dwy[n])) * 48 + (n % MX) * 8 + int'(dwx[n])] = dwc[n];
    end
    if (disp_checking && pv && pfs) begin
      if (t_fs0 < 0) t_fs0 = cyc;
      else if (t_fs1 < 0) t_fs1 = cyc;
    end
    if (disp_checking && pv && pfs && pix_seen == 0) disp_active = 1'b1;
    if (disp_active && pv && pix_seen < 48 * 24) begin
      checks++;
      if (int'(py) * 48 + int'(px) != pix_seen || prgb !== ref_img[pix_seen]) begin
        failures++; $display("pixel %0d wrong", pix_seen);
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
          dwc[n] = 24'($urandom);
          painted[n]++;
        end else dwv[n] = 1'b0;
      end
    end
  end

  initial begin
    foreach (painted[n]) begin painted[n] = 0; acc[n] = 1'b0; cfg_bidx[n] = 0; got_word[n] = 0; end
    for (int i = 0; i < NT; i++) temp[i] = 8'd40;
    repeat (5) @(posedge clk_ep);
    rst_n = 1'b1;
    repeat (3) @(posedge clk_ep);
    armed = 1'b1;
    power_on = 1'b1;
    wait (running);
    $display("stack running at %0t", $time);
    repeat (20) @(posedge clk_ep);
    // Routing: every ECell to the opposite one.
    send_now = 1'b1;
    repeat (500) @(posedge clk_ep);
    foreach (got_word[n]) begin
      checks++;
      if (got_word[n] != 1) begin failures++; $display("ECell %0d received %0d words", n, got_word[n]); end
    end
    // Configuration of all ECells, display painting and scan meanwhile.
    @(negedge clk_node[0]) cfg_start = '1;
    repeat (4) @(negedge clk_ep);
    cfg_start = '0;
    painting = 1'b1;
    repeat (64 * N + 50) @(posedge clk_ep);
    painting = 1'b0;
    disp_checking = 1'b1;
    wait (t_fs1 >= 0);
    checks++;
    if (t_fs1 - t_fs0 != 499968) begin failures++; $display("frame period %0d", t_fs1 - t_fs0); end
    checks++;
    if (pix_seen != 48 * 24) begin failures++; $display("%0d pixels checked", pix_seen); end
    wait (cok == '1 || cerr != '0);
    repeat (10) @(posedge clk_ep);
    checks++;
    if (cok != '1 || cerr != '0) begin failures++; $display("config ok %b err %b", cok, cerr); end
    foreach (cfg_bidx[n]) begin
      checks++;
      if (cfg_bidx[n] != CFG_BYTES) begin failures++; $display("ECell %0d: %0d bytes", n, cfg_bidx[n]); end
    end
    checks++;
    if (ovf != '0 || sstate != SUP_RUN) begin failures++; $display("overflow %b state %0d", ovf, sstate); end
    $display("configuration finished at %0t", $time);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk_ep);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
