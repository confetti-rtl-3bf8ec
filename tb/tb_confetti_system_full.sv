// tb_confetti_system_full: one complete operation of the 3 x 2 CONFETTI
// system with every parameter at its default (six UltraStacks, 18 x 6
// routing FPGAs, default supervisor timing, 50 MHz display clocks). All six
// stacks are powered up through their supervisors; every ECell sends a word
// to the ECell diagonally opposite on the whole array; words enter at the
// west and north edges and leave at the east edge; finally one stack is
// switched off while row 0 keeps routing across the others, and it is
// started again. ECell configuration and the display frame at full size
// (two 500 000-cycle frames) are covered by the single-stack full-size
// test and are not repeated here.
// Word layout: [15:11] destination x, [10:8] destination y, [7:0] payload.
// Payload 0xxxxxxx: source node number; 100rrrrr: entered on west row r;
// 101ccccc: entered on north column c; 110xxxxx: row-0 word from column x;
// 111rrrrr: word for the east edge, row r.
module tb_confetti_system_full;
  import confetti_pkg::*;
  localparam int unsigned SX = 3, SY = 2, NS = SX * SY, MX = 6, MY = 3, N = MX * MY;
  localparam int unsigned GX = SX * MX, GY = SY * MY, W = 16, NT = 2 * N + 9;
  localparam int unsigned CFG_BYTES = 130952;

  int checks = 0, failures = 0;

  logic [NS-1:0][N-1:0] clk_node;
  logic [NS-1:0]        clk_ep;
  logic                 rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a falling edge applies the asynchronous resets

  logic [GX-1:0] n_tx_clk, s_tx_clk, n_rx_clk;
  logic [GX-1:0][1:0] n_tx_d, s_tx_d, n_rx_d;
  logic [GY-1:0] w_tx_clk, e_tx_clk, w_rx_clk;
  logic [GY-1:0][1:0] w_tx_d, e_tx_d, w_rx_d;
  logic [NS-1:0][N-1:0] ec_tx_clk, ec_rx_clk;
  logic [NS-1:0][N-1:0][1:0] ec_tx_d, ec_rx_d;
  logic [NS-1:0][N-1:0][4:0] ovf, ov, ordy, iv, irdy;
  logic [NS-1:0][N-1:0][4:0][W-1:0] od, id;
  logic [NS-1:0][N-1:0] cfg_start = '0, cbusy, cok, cerr, frd, frv, pb, ib, cc, cd, dn;
  logic [NS-1:0][N-1:0][3:0] cfg_slot;
  logic [NS-1:0][N-1:0][20:0] fa;
  logic [NS-1:0][N-1:0][7:0] fd;
  logic [NS-1:0][N-1:0] dwr;
  logic [NS-1:0] pv, pfs, rout_prog, running;
  logic [NS-1:0] power_on = '0;
  logic [NS-1:0][5:0] px, conv_en, pgood;
  logic [NS-1:0][4:0] py;
  logic [NS-1:0][23:0] prgb;
  logic [NS-1:0][N-1:0] rout_done;
  logic [NS-1:0][NT-1:0][7:0] temp;
  logic [NS-1:0][7:0] fan_on;
  sup_state_e [NS-1:0] sstate;
  fault_e     [NS-1:0] sfault;

  confetti_system dut (
    .rst_n(rst_n), .clk_node(clk_node), .clk_epower(clk_ep),
    .north_tx_clk(n_tx_clk), .south_tx_clk(s_tx_clk), .north_tx_d(n_tx_d), .south_tx_d(s_tx_d),
    .north_rx_clk(n_rx_clk), .south_rx_clk({GX{clk_ep[0]}}), .north_rx_d(n_rx_d), .south_rx_d('0),
    .west_tx_clk(w_tx_clk), .east_tx_clk(e_tx_clk), .west_tx_d(w_tx_d), .east_tx_d(e_tx_d),
    .west_rx_clk(w_rx_clk), .east_rx_clk({GY{clk_ep[0]}}), .west_rx_d(w_rx_d), .east_rx_d('0),
    .ecell_tx_clk(ec_tx_clk), .ecell_tx_d(ec_tx_d), .ecell_rx_clk(ec_rx_clk), .ecell_rx_d(ec_rx_d),
    .lnk_overflow(ovf),
    .rt_out_valid(ov), .rt_out_data(od), .rt_out_ready(ordy),
    .rt_in_valid(iv), .rt_in_data(id), .rt_in_ready(irdy),
    .cfg_start(cfg_start), .cfg_slot(cfg_slot), .cfg_busy(cbusy), .cfg_ok(cok), .cfg_err(cerr),
    .flash_rd(frd), .flash_addr(fa), .flash_rvalid(frv), .flash_rdata(fd),
    .ecell_prog_b(pb), .ecell_init_b(ib), .ecell_cclk(cc), .ecell_din(cd), .ecell_done(dn),
    .disp_wr_valid('0), .disp_wr_x('0), .disp_wr_y('0), .disp_wr_rgb('0), .disp_wr_ready(dwr),
    .pix_valid(pv), .pix_frame_start(pfs), .pix_x(px), .pix_y(py), .pix_rgb(prgb),
    .power_on(power_on), .conv_en(conv_en), .pgood(pgood), .rout_prog(rout_prog),
    .rout_done(rout_done), .temp(temp), .fan_force('0), .fan_on(fan_on),
    .sup_state(sstate), .sup_fault(sfault), .running(running)
  );

  function automatic logic [7:0] flash_ref(input logic [20:0] a);
    return 8'(a * 7) ^ 8'(a >> 8) ^ 8'(a >> 17) ^ 8'h5A;
  endfunction

  // Word queues towards the ECell links and the outer edge transmitters.
  logic [W-1:0] txq [NS][N][$];
  logic [W-1:0] wq [GY][$];
  logic [W-1:0] nq [GX][$];
  int  got_opp = 0, got_west = 0, got_north = 0, got_row = 0, got_east = 0;
  int  rx_cnt [NS][N];
  int  cfg_bidx [NS][N];
  bit  armed = 1'b0;

  for (genvar s = 0; s < NS; s++) begin : g_s
    localparam int SXI = s % SX, SYI = s / SX;
    initial clk_ep[s] = 1'b0;
    always #(10 + s) clk_ep[s] = ~clk_ep[s];

    // Plant: converters and ERouting FPGA configuration of this stack.
    logic [5:0]   pg = '0;
    logic [N-1:0] rd = '0;
    int           pg_cnt [6], rd_cnt [N];
    bit           cfg_go = 1'b0;
    assign pgood[s]     = pg;
    assign rout_done[s] = rd;
    always @(posedge clk_ep[s]) begin
      for (int i = 0; i < 6; i++) begin
        if (!conv_en[s][i]) begin pg_cnt[i] = 0; pg[i] <= 1'b0; end
        else begin pg_cnt[i]++; if (pg_cnt[i] == 1000 + 100 * i) pg[i] <= 1'b1; end
      end
      if (conv_en[s] == '0) cfg_go = 1'b0;
      else if (rout_prog[s]) cfg_go = 1'b1;
      for (int i = 0; i < N; i++) begin
        if (!cfg_go) begin rd_cnt[i] = 0; rd[i] <= 1'b0; end
        else begin rd_cnt[i]++; if (rd_cnt[i] == 20000 + 500 * i) rd[i] <= 1'b1; end
      end
    end
    for (genvar i = 0; i < NT; i++) begin : g_t
      assign temp[s][i] = 8'd40;
    end

    for (genvar n = 0; n < N; n++) begin : g_n
      localparam int GXI = SXI * MX + n % MX, GYI = SYI * MY + n / MX;
      localparam int G = GYI * GX + GXI;
      logic c = 1'b0;
      always #(4 + G % 3) c = ~c;
      assign clk_node[s][n] = c;

      int hops [5];
      xy_router_model #(.X(GXI), .Y(GYI), .W(W), .XW(5), .YW(3)) rt (
        .clk(c), .rst_n(running[s]), .stall(1'b0),
        .in_valid(iv[s][n]), .in_data(id[s][n]), .in_ready(irdy[s][n]),
        .out_valid(ov[s][n]), .out_data(od[s][n]), .out_ready(ordy[s][n]), .sent(hops));

      assign cfg_slot[s][n] = 4'(G % 16);
      flash_model #(.LAT(3)) fl (
        .clk(c), .rd(frd[s][n]), .addr(fa[s][n]), .rvalid(frv[s][n]), .rdata(fd[s][n]));
      logic       bv;
      logic [7:0] bo;
      int         brx;
      ecell_cfg_model #(.EXPECT_BYTES(CFG_BYTES), .INIT_DELAY(100)) ec (
        .clk(c), .prog_b(pb[s][n]), .init_b(ib[s][n]), .cclk(cc[s][n]), .din(cd[s][n]),
        .done(dn[s][n]), .byte_valid(bv), .byte_out(bo), .bytes_rx(brx));
      always @(posedge c)
        if (bv) begin
          checks++;
          if (bo !== flash_ref(21'((G % 16) * 131072 + cfg_bidx[s][n]))) begin
            failures++; $display("ECell %0d config byte %0d wrong", G, cfg_bidx[s][n]);
          end
          cfg_bidx[s][n]++;
        end

      // ECell end of the data link.
      logic         etx_v = 1'b0, etx_r, erx_v, erx_ovf;
      logic [W-1:0] etx_w = '0, erx_d;
      lvds_link_tx #(.WORD_W(W)) etx (
        .clk(c), .rst_n(rst_n), .in_valid(etx_v), .in_data(etx_w), .in_ready(etx_r),
        .lnk_clk(ec_rx_clk[s][n]), .lnk_d(ec_rx_d[s][n]));
      lvds_link_rx #(.WORD_W(W)) erx (
        .clk(c), .rst_n(rst_n), .lnk_clk(ec_tx_clk[s][n]), .lnk_d(ec_tx_d[s][n]),
        .out_valid(erx_v), .out_data(erx_d), .out_ready(1'b1), .overflow(erx_ovf));
      always @(posedge c) begin
        if (etx_v && etx_r) etx_v <= 1'b0;
        else if (!etx_v && txq[s][n].size() != 0) begin
          etx_w <= txq[s][n].pop_front();
          etx_v <= 1'b1;
        end
        if (armed && erx_v) begin
          checks++;
          rx_cnt[s][n]++;
          if (erx_d[15:8] !== {5'(GXI), 3'(GYI)}) begin
            failures++; $display("ECell %0d got %h", G, erx_d);
          end else if (!erx_d[7]) begin
            if (int'(erx_d[6:0]) != GX * GY - 1 - G) begin
              failures++; $display("ECell %0d got %h", G, erx_d);
            end else got_opp++;
          end else case (erx_d[7:5])
            3'b100: if (GXI != GX - 1 || int'(erx_d[4:0]) != GYI) begin
                      failures++; $display("ECell %0d got %h", G, erx_d);
                    end else got_west++;
            3'b101: if (GYI != GY - 1 || int'(erx_d[4:0]) != GXI) begin
                      failures++; $display("ECell %0d got %h", G, erx_d);
                    end else got_north++;
            3'b110: if (GYI != 0 || int'(erx_d[4:0]) != GX - 1 - GXI) begin
                      failures++; $display("ECell %0d got %h", G, erx_d);
                    end else got_row++;
            default: begin failures++; $display("ECell %0d got %h", G, erx_d); end
          endcase
        end
      end
    end
  end

  // Outer edge: transmitters on the west rows and north columns, receivers
  // on the east rows; the rest idle on a running clock.
  for (genvar r = 0; r < GY; r++) begin : g_w
    logic         v = 1'b0, rdy, ev, eovf;
    logic [W-1:0] w = '0, ed;
    lvds_link_tx #(.WORD_W(W)) tx (
      .clk(clk_ep[0]), .rst_n(rst_n), .in_valid(v), .in_data(w), .in_ready(rdy),
      .lnk_clk(w_rx_clk[r]), .lnk_d(w_rx_d[r]));
    always @(posedge clk_ep[0])
      if (v && rdy) v <= 1'b0;
      else if (!v && wq[r].size() != 0) begin w <= wq[r].pop_front(); v <= 1'b1; end
    lvds_link_rx #(.WORD_W(W)) rx (
      .clk(clk_ep[0]), .rst_n(rst_n), .lnk_clk(e_tx_clk[r]), .lnk_d(e_tx_d[r]),
      .out_valid(ev), .out_data(ed), .out_ready(1'b1), .overflow(eovf));
    always @(posedge clk_ep[0])
      if (armed && ev) begin
        checks++;
        if (ed !== {5'd31, 3'(r), 3'b111, 5'(r)}) begin
          failures++; $display("east row %0d got %h", r, ed);
        end else got_east++;
      end
  end
  for (genvar x = 0; x < GX; x++) begin : g_nt
    logic         v = 1'b0, rdy;
    logic [W-1:0] w = '0;
    lvds_link_tx #(.WORD_W(W)) tx (
      .clk(clk_ep[0]), .rst_n(rst_n), .in_valid(v), .in_data(w), .in_ready(rdy),
      .lnk_clk(n_rx_clk[x]), .lnk_d(n_rx_d[x]));
    always @(posedge clk_ep[0])
      if (v && rdy) v <= 1'b0;
      else if (!v && nq[x].size() != 0) begin w <= nq[x].pop_front(); v <= 1'b1; end
  end

  task automatic expect_count(input string what, input int got, input int want);
    checks++;
    if (got != want) begin failures++; $display("%s: %0d words, expected %0d", what, got, want); end
  endtask

  initial begin
    for (int s = 0; s < NS; s++) begin
      for (int n = 0; n < N; n++) begin rx_cnt[s][n] = 0; cfg_bidx[s][n] = 0; end
    end
    repeat (5) @(posedge clk_ep[0]);
    rst_n = 1'b1;
    repeat (3) @(posedge clk_ep[0]);
    armed = 1'b1;

    // power-up
    power_on = '1;
    wait (running == '1);
    $display("all stacks running at %0t", $time);
    for (int s = 0; s < NS; s++) begin
      checks++;
      if (sstate[s] != SUP_RUN || conv_en[s] != '1) begin failures++; $display("stack %0d not running", s); end
    end
    repeat (20) @(posedge clk_ep[0]);

    // crossing: each ECell to the diagonally opposite one
    for (int s = 0; s < NS; s++)
      for (int n = 0; n < N; n++) begin
        int gx, gy;
        gx = (s % SX) * MX + n % MX;
        gy = (s / SX) * MY + n / MX;
        txq[s][n].push_back({5'(GX - 1 - gx), 3'(GY - 1 - gy), 8'(gy * GX + gx)});
      end
    repeat (1500) @(posedge clk_ep[0]);
    expect_count("crossing", got_opp, GX * GY);

    // edge-in and edge-out
    for (int r = 0; r < GY; r++) begin
      wq[r].push_back({5'(GX - 1), 3'(r), 3'b100, 5'(r)});
      txq[(r / MY) * SX][(r % MY) * MX].push_back({5'd31, 3'(r), 3'b111, 5'(r)});
    end
    for (int x = 0; x < GX; x++) nq[x].push_back({5'(x), 3'(GY - 1), 3'b101, 5'(x)});
    repeat (1000) @(posedge clk_ep[0]);
    expect_count("edge-in west", got_west, GY);
    expect_count("edge-in north", got_north, GX);
    expect_count("edge-out east", got_east, GY);

    checks++;
    if (cbusy != '0 || cfg_bidx[0][0] != 0) begin failures++; $display("unexpected configuration activity"); end

    // shutdown of stack 5; row 0 (stacks 0..2) still routes end to end
    power_on[NS-1] = 1'b0;
    wait (sstate[NS-1] == SUP_OFF);
    $display("stack %0d off at %0t", NS - 1, $time);
    repeat (20) @(posedge clk_ep[0]);
    checks++;
    if (running != NS'({NS - 1{1'b1}}) || conv_en[NS-1] != '0) begin
      failures++; $display("shutdown: running %b", running);
    end
    for (int x = 0; x < GX; x++)
      txq[x / MX][x % MX].push_back({5'(GX - 1 - x), 3'd0, 3'b110, 5'(x)});
    repeat (1000) @(posedge clk_ep[0]);
    expect_count("row 0 during shutdown", got_row, GX);
    for (int s = 0; s < NS - 1; s++) begin
      checks++;
      if (sstate[s] != SUP_RUN) begin failures++; $display("stack %0d left RUN", s); end
    end

    // restart of stack 5
    power_on[NS-1] = 1'b1;
    wait (running == '1);
    checks++;
    if (sfault != '0 || ovf != '0) begin failures++; $display("faults or overflow"); end
    $display("crossing %0d, west %0d, north %0d, east %0d, row %0d words",
             got_opp, got_west, got_north, got_east, got_row);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk_ep[0]);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
