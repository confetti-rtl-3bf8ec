// confetti_system: a CONFETTI machine of SX x SY UltraStacks (3 x 2).
//
// UltraStacks are placed side by side and their ERouting boards are joined
// through the edge connectors, which carry the same links as those between
// neighbouring FPGAs on a board. Joined stacks therefore form one uniform
// grid of (SX*6) x (SY*3) routing FPGAs, 18 x 6 for the 3 x 2 system; a
// packet crosses a stack boundary exactly like any other hop. Each stack
// keeps its own EPower board (supervisor, fans, display), so its ports are
// those of ultrastack with one more array level: stack s = sy*SX + sx.
// Only the links on the outside of the whole array leave this module:
// north_*/south_* are indexed by global column (0 .. SX*6-1), west_*/east_*
// by global row (0 .. SY*3-1). A stack that is not running holds its links
// idle, so its neighbours simply receive nothing from it.
module confetti_system
  import confetti_pkg::*;
#(
  parameter int unsigned SX            = 3,
  parameter int unsigned SY            = 2,
  parameter int unsigned WORD_W        = 16,
  parameter int unsigned CFG_BYTES     = 130952,
  parameter int unsigned CFG_TIMEOUT   = 100000,
  parameter int unsigned STABLE_CYCLES = 5000,
  parameter int unsigned PGOOD_TIMEOUT = 500000,
  parameter int unsigned ROUT_TIMEOUT  = 5000000,
  parameter int unsigned DISP_CLK_HZ   = 50_000_000,
  localparam int unsigned MX     = 6,
  localparam int unsigned MY     = 3,
  localparam int unsigned NS     = SX * SY,
  localparam int unsigned N      = MX * MY,
  localparam int unsigned N_TEMP = 2 * N + 9,
  localparam int unsigned GX     = SX * MX,
  localparam int unsigned GY     = SY * MY
) (
  input  logic                                          rst_n,
  input  logic [NS-1:0][N-1:0]                          clk_node,
  input  logic [NS-1:0]                                 clk_epower,
  // outer edge of the whole array
  output logic [GX-1:0]                                 north_tx_clk, south_tx_clk,
  output logic [GX-1:0][1:0]                            north_tx_d,   south_tx_d,
  input  logic [GX-1:0]                                 north_rx_clk, south_rx_clk,
  input  logic [GX-1:0][1:0]                            north_rx_d,   south_rx_d,
  output logic [GY-1:0]                                 west_tx_clk,  east_tx_clk,
  output logic [GY-1:0][1:0]                            west_tx_d,    east_tx_d,
  input  logic [GY-1:0]                                 west_rx_clk,  east_rx_clk,
  input  logic [GY-1:0][1:0]                            west_rx_d,    east_rx_d,
  // per stack: ECell links, router streams, overflow
  output logic [NS-1:0][N-1:0]                          ecell_tx_clk,
  output logic [NS-1:0][N-1:0][1:0]                     ecell_tx_d,
  input  logic [NS-1:0][N-1:0]                          ecell_rx_clk,
  input  logic [NS-1:0][N-1:0][1:0]                     ecell_rx_d,
  output logic [NS-1:0][N-1:0][N_PORTS-1:0]             lnk_overflow,
  input  logic [NS-1:0][N-1:0][N_PORTS-1:0]             rt_out_valid,
  input  logic [NS-1:0][N-1:0][N_PORTS-1:0][WORD_W-1:0] rt_out_data,
  output logic [NS-1:0][N-1:0][N_PORTS-1:0]             rt_out_ready,
  output logic [NS-1:0][N-1:0][N_PORTS-1:0]             rt_in_valid,
  output logic [NS-1:0][N-1:0][N_PORTS-1:0][WORD_W-1:0] rt_in_data,
  input  logic [NS-1:0][N-1:0][N_PORTS-1:0]             rt_in_ready,
  // per stack: ECell configuration
  input  logic [NS-1:0][N-1:0]                          cfg_start,
  input  logic [NS-1:0][N-1:0][3:0]                     cfg_slot,
  output logic [NS-1:0][N-1:0]                          cfg_busy,
  output logic [NS-1:0][N-1:0]                          cfg_ok,
  output logic [NS-1:0][N-1:0]                          cfg_err,
  output logic [NS-1:0][N-1:0]                          flash_rd,
  output logic [NS-1:0][N-1:0][20:0]                    flash_addr,
  input  logic [NS-1:0][N-1:0]                          flash_rvalid,
  input  logic [NS-1:0][N-1:0][7:0]                     flash_rdata,
  output logic [NS-1:0][N-1:0]                          ecell_prog_b,
  input  logic [NS-1:0][N-1:0]                          ecell_init_b,
  output logic [NS-1:0][N-1:0]                          ecell_cclk,
  output logic [NS-1:0][N-1:0]                          ecell_din,
  input  logic [NS-1:0][N-1:0]                          ecell_done,
  // per stack: display
  input  logic [NS-1:0][N-1:0]                          disp_wr_valid,
  input  logic [NS-1:0][N-1:0][2:0]                     disp_wr_x,
  input  logic [NS-1:0][N-1:0][2:0]                     disp_wr_y,
  input  logic [NS-1:0][N-1:0][23:0]                    disp_wr_rgb,
  output logic [NS-1:0][N-1:0]                          disp_wr_ready,
  output logic [NS-1:0]                                 pix_valid,
  output logic [NS-1:0]                                 pix_frame_start,
  output logic [NS-1:0][5:0]                            pix_x,
  output logic [NS-1:0][4:0]                            pix_y,
  output logic [NS-1:0][23:0]                           pix_rgb,
  // per stack: power and thermal
  input  logic [NS-1:0]                                 power_on,
  output logic [NS-1:0][5:0]                            conv_en,
  input  logic [NS-1:0][5:0]                            pgood,
  output logic [NS-1:0]                                 rout_prog,
  input  logic [NS-1:0][N-1:0]                          rout_done,
  input  logic [NS-1:0][N_TEMP-1:0][7:0]                temp,
  input  logic [NS-1:0]                                 fan_force,
  output logic [NS-1:0][7:0]                            fan_on,
  output sup_state_e [NS-1:0]                           sup_state,
  output fault_e     [NS-1:0]                           sup_fault,
  output logic [NS-1:0]                                 running
);
  // Edge links of every stack.
  logic [NS-1:0][MX-1:0]      n_tx_clk, s_tx_clk, n_rx_clk, s_rx_clk;
  logic [NS-1:0][MX-1:0][1:0] n_tx_d,   s_tx_d,   n_rx_d,   s_rx_d;
  logic [NS-1:0][MY-1:0]      w_tx_clk, e_tx_clk, w_rx_clk, e_rx_clk;
  logic [NS-1:0][MY-1:0][1:0] w_tx_d,   e_tx_d,   w_rx_d,   e_rx_d;

  for (genvar sy = 0; sy < SY; sy++) begin : g_sy
    for (genvar sx = 0; sx < SX; sx++) begin : g_sx
      localparam int unsigned S = sy * SX + sx;

      // receive side of the four edges: a neighbouring stack or the outside
      if (sy == 0) begin : g_n_out
        assign n_rx_clk[S] = north_rx_clk[sx*MX +: MX];
        assign n_rx_d[S]   = north_rx_d[sx*MX +: MX];
        assign north_tx_clk[sx*MX +: MX] = n_tx_clk[S];
        assign north_tx_d[sx*MX +: MX]   = n_tx_d[S];
      end else begin : g_n_in
        assign n_rx_clk[S] = s_tx_clk[S-SX];
        assign n_rx_d[S]   = s_tx_d[S-SX];
      end
      if (sy == SY - 1) begin : g_s_out
        assign s_rx_clk[S] = south_rx_clk[sx*MX +: MX];
        assign s_rx_d[S]   = south_rx_d[sx*MX +: MX];
        assign south_tx_clk[sx*MX +: MX] = s_tx_clk[S];
        assign south_tx_d[sx*MX +: MX]   = s_tx_d[S];
      end else begin : g_s_in
        assign s_rx_clk[S] = n_tx_clk[S+SX];
        assign s_rx_d[S]   = n_tx_d[S+SX];
      end
      if (sx == 0) begin : g_w_out
        assign w_rx_clk[S] = west_rx_clk[sy*MY +: MY];
        assign w_rx_d[S]   = west_rx_d[sy*MY +: MY];
        assign west_tx_clk[sy*MY +: MY] = w_tx_clk[S];
        assign west_tx_d[sy*MY +: MY]   = w_tx_d[S];
      end else begin : g_w_in
        assign w_rx_clk[S] = e_tx_clk[S-1];
        assign w_rx_d[S]   = e_tx_d[S-1];
      end
      if (sx == SX - 1) begin : g_e_out
        assign e_rx_clk[S] = east_rx_clk[sy*MY +: MY];
        assign e_rx_d[S]   = east_rx_d[sy*MY +: MY];
        assign east_tx_clk[sy*MY +: MY] = e_tx_clk[S];
        assign east_tx_d[sy*MY +: MY]   = e_tx_d[S];
      end else begin : g_e_in
        assign e_rx_clk[S] = w_tx_clk[S+1];
        assign e_rx_d[S]   = w_tx_d[S+1];
      end

      ultrastack #(
        .MESH_X       (MX),
        .MESH_Y       (MY),
        .WORD_W       (WORD_W),
        .CFG_BYTES    (CFG_BYTES),
        .CFG_TIMEOUT  (CFG_TIMEOUT),
        .STABLE_CYCLES(STABLE_CYCLES),
        .PGOOD_TIMEOUT(PGOOD_TIMEOUT),
        .ROUT_TIMEOUT (ROUT_TIMEOUT),
        .DISP_CLK_HZ  (DISP_CLK_HZ)
      ) u_stack (
        .rst_n          (rst_n),
        .clk_node       (clk_node[S]),
        .clk_epower     (clk_epower[S]),
        .north_tx_clk   (n_tx_clk[S]), .north_tx_d(n_tx_d[S]),
        .north_rx_clk   (n_rx_clk[S]), .north_rx_d(n_rx_d[S]),
        .south_tx_clk   (s_tx_clk[S]), .south_tx_d(s_tx_d[S]),
        .south_rx_clk   (s_rx_clk[S]), .south_rx_d(s_rx_d[S]),
        .west_tx_clk    (w_tx_clk[S]), .west_tx_d (w_tx_d[S]),
        .west_rx_clk    (w_rx_clk[S]), .west_rx_d (w_rx_d[S]),
        .east_tx_clk    (e_tx_clk[S]), .east_tx_d (e_tx_d[S]),
        .east_rx_clk    (e_rx_clk[S]), .east_rx_d (e_rx_d[S]),
        .ecell_tx_clk   (ecell_tx_clk[S]),
        .ecell_tx_d     (ecell_tx_d[S]),
        .ecell_rx_clk   (ecell_rx_clk[S]),
        .ecell_rx_d     (ecell_rx_d[S]),
        .lnk_overflow   (lnk_overflow[S]),
        .rt_out_valid   (rt_out_valid[S]),
        .rt_out_data    (rt_out_data[S]),
        .rt_out_ready   (rt_out_ready[S]),
        .rt_in_valid    (rt_in_valid[S]),
        .rt_in_data     (rt_in_data[S]),
        .rt_in_ready    (rt_in_ready[S]),
        .cfg_start      (cfg_start[S]),
        .cfg_slot       (cfg_slot[S]),
        .cfg_busy       (cfg_busy[S]),
        .cfg_ok         (cfg_ok[S]),
        .cfg_err        (cfg_err[S]),
        .flash_rd       (flash_rd[S]),
        .flash_addr     (flash_addr[S]),
        .flash_rvalid   (flash_rvalid[S]),
        .flash_rdata    (flash_rdata[S]),
        .ecell_prog_b   (ecell_prog_b[S]),
        .ecell_init_b   (ecell_init_b[S]),
        .ecell_cclk     (ecell_cclk[S]),
        .ecell_din      (ecell_din[S]),
        .ecell_done     (ecell_done[S]),
        .disp_wr_valid  (disp_wr_valid[S]),
        .disp_wr_x      (disp_wr_x[S]),
        .disp_wr_y      (disp_wr_y[S]),
        .disp_wr_rgb    (disp_wr_rgb[S]),
        .disp_wr_ready  (disp_wr_ready[S]),
        .pix_valid      (pix_valid[S]),
        .pix_frame_start(pix_frame_start[S]),
        .pix_x          (pix_x[S]),
        .pix_y          (pix_y[S]),
        .pix_rgb        (pix_rgb[S]),
        .power_on       (power_on[S]),
        .conv_en        (conv_en[S]),
        .pgood          (pgood[S]),
        .rout_prog      (rout_prog[S]),
        .rout_done      (rout_done[S]),
        .temp           (temp[S]),
        .fan_force      (fan_force[S]),
        .fan_on         (fan_on[S]),
        .sup_state      (sup_state[S]),
        .sup_fault      (sup_fault[S]),
        .running        (running[S])
      );
    end
  end

endmodule
