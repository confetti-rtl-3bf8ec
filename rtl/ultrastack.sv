// ultrastack: one CONFETTI UltraStack, the logic of its four board layers.
//
// The ERouting board carries a MESH_X x MESH_Y grid (6 x 3) of ERouting
// FPGAs. Each is joined to its four cardinal neighbours and to the ECell
// above it by serial links (forwarded clock + two data pairs per direction);
// links at the edge of the grid leave the board on its side connectors so
// that neighbouring stacks form one larger grid. Every FPGA has its own
// clock (clk_node): there is no global clock, and every link crosses clock
// domains in its receiver. Each node also loads its ECell from its flash.
// The EPower board supervises start-up and shutdown, switches the fans of
// its zone, and keeps the framebuffer of the 48 x 24 display, where the
// ECell of node (x, y) owns the 8 x 8 square at column x, row y.
//
// Node index n = y*MESH_X + x, row y = 0 at the north edge. Port order inside
// a node follows confetti_pkg::port_e (N, E, S, W, ECell).
// Reset: the node logic and the display are held in reset until rst_n is
// high and the supervisor reports running; the release is synchronised in
// every clock domain. The per-node packet router (a Hermes switch on the
// platform) is outside this module: its word streams are the rt_* ports.
// Edge links: north_*[x], south_*[x], west_*[y], east_*[y].
// Temperature sensors, in order: the MESH_X*MESH_Y ECells, the
// MESH_X*MESH_Y ERouting FPGAs, three more on the ERouting board, six on
// EPower.
module ultrastack
  import confetti_pkg::*;
#(
  parameter int unsigned MESH_X        = 6,
  parameter int unsigned MESH_Y        = 3,
  parameter int unsigned WORD_W        = 16,
  parameter int unsigned FIFO_AW       = 3,
  parameter int unsigned CFG_BYTES     = 130952,
  parameter int unsigned CFG_TIMEOUT   = 100000,
  parameter int unsigned N_CONV        = 6,
  parameter int unsigned N_FANS        = 8,
  parameter int unsigned STABLE_CYCLES = 5000,
  parameter int unsigned PGOOD_TIMEOUT = 500000,
  parameter int unsigned ROUT_TIMEOUT  = 5000000,
  parameter int unsigned DISP_CLK_HZ   = 50_000_000,
  localparam int unsigned N       = MESH_X * MESH_Y,
  localparam int unsigned N_TEMP  = 2 * N + 3 + 6,
  localparam int unsigned DX_W    = $clog2(8 * MESH_X),
  localparam int unsigned DY_W    = $clog2(8 * MESH_Y)
) (
  input  logic                                  rst_n,
  input  logic [N-1:0]                          clk_node,
  input  logic                                  clk_epower,
  // grid edge links
  output logic [MESH_X-1:0]                     north_tx_clk, south_tx_clk,
  output logic [MESH_X-1:0][1:0]                north_tx_d,   south_tx_d,
  input  logic [MESH_X-1:0]                     north_rx_clk, south_rx_clk,
  input  logic [MESH_X-1:0][1:0]                north_rx_d,   south_rx_d,
  output logic [MESH_Y-1:0]                     west_tx_clk,  east_tx_clk,
  output logic [MESH_Y-1:0][1:0]                west_tx_d,    east_tx_d,
  input  logic [MESH_Y-1:0]                     west_rx_clk,  east_rx_clk,
  input  logic [MESH_Y-1:0][1:0]                west_rx_d,    east_rx_d,
  // ECell data links
  output logic [N-1:0]                          ecell_tx_clk,
  output logic [N-1:0][1:0]                     ecell_tx_d,
  input  logic [N-1:0]                          ecell_rx_clk,
  input  logic [N-1:0][1:0]                     ecell_rx_d,
  output logic [N-1:0][N_PORTS-1:0]             lnk_overflow,
  // router word streams, per node and port
  input  logic [N-1:0][N_PORTS-1:0]             rt_out_valid,
  input  logic [N-1:0][N_PORTS-1:0][WORD_W-1:0] rt_out_data,
  output logic [N-1:0][N_PORTS-1:0]             rt_out_ready,
  output logic [N-1:0][N_PORTS-1:0]             rt_in_valid,
  output logic [N-1:0][N_PORTS-1:0][WORD_W-1:0] rt_in_data,
  input  logic [N-1:0][N_PORTS-1:0]             rt_in_ready,
  // ECell configuration, per node
  input  logic [N-1:0]                          cfg_start,
  input  logic [N-1:0][3:0]                     cfg_slot,
  output logic [N-1:0]                          cfg_busy,
  output logic [N-1:0]                          cfg_ok,
  output logic [N-1:0]                          cfg_err,
  output logic [N-1:0]                          flash_rd,
  output logic [N-1:0][20:0]                    flash_addr,
  input  logic [N-1:0]                          flash_rvalid,
  input  logic [N-1:0][7:0]                     flash_rdata,
  output logic [N-1:0]                          ecell_prog_b,
  input  logic [N-1:0]                          ecell_init_b,
  output logic [N-1:0]                          ecell_cclk,
  output logic [N-1:0]                          ecell_din,
  input  logic [N-1:0]                          ecell_done,
  // display: ECell pixel writes and refresh scan
  input  logic [N-1:0]                          disp_wr_valid,
  input  logic [N-1:0][2:0]                     disp_wr_x,
  input  logic [N-1:0][2:0]                     disp_wr_y,
  input  logic [N-1:0][23:0]                    disp_wr_rgb,
  output logic [N-1:0]                          disp_wr_ready,
  output logic                                  pix_valid,
  output logic                                  pix_frame_start,
  output logic [DX_W-1:0]                       pix_x,
  output logic [DY_W-1:0]                       pix_y,
  output logic [23:0]                           pix_rgb,
  // power, configuration of the ERouting FPGAs, thermal
  input  logic                                  power_on,
  output logic [N_CONV-1:0]                     conv_en,
  input  logic [N_CONV-1:0]                     pgood,
  output logic                                  rout_prog,
  input  logic [N-1:0]                          rout_done,
  input  logic [N_TEMP-1:0][7:0]                temp,
  input  logic                                  fan_force,
  output logic [N_FANS-1:0]                     fan_on,
  output sup_state_e                            sup_state,
  output fault_e                                sup_fault,
  output logic                                  running
);

  // ---------------- EPower: supervisor and fans ----------------
  power_supervisor #(
    .N_CONV       (N_CONV),
    .N_ROUT       (N),
    .N_TEMP       (N_TEMP),
    .STABLE_CYCLES(STABLE_CYCLES),
    .PGOOD_TIMEOUT(PGOOD_TIMEOUT),
    .CFG_TIMEOUT  (ROUT_TIMEOUT)
  ) u_sup (
    .clk      (clk_epower),
    .rst_n    (rst_n),
    .power_on (power_on),
    .conv_en  (conv_en),
    .pgood    (pgood),
    .rout_prog(rout_prog),
    .rout_done(rout_done),
    .temp     (temp),
    .state    (sup_state),
    .fault    (sup_fault),
    .running  (running)
  );

  fan_controller #(.N_FANS(N_FANS), .N_TEMP(N_TEMP)) u_fans (
    .clk      (clk_epower),
    .rst_n    (rst_n),
    .temp     (temp),
    .force_all(fan_force),
    .fan_on   (fan_on)
  );

  logic sys_rst_n;
  assign sys_rst_n = rst_n && running;

  // ---------------- EPower: display framebuffer ----------------
  logic disp_rst_n;
  reset_sync u_disp_rst (.clk(clk_epower), .rst_n(sys_rst_n), .rst_n_sync(disp_rst_n));

  display_framebuffer #(
    .DISP_W(8 * MESH_X),
    .DISP_H(8 * MESH_Y),
    .SQ    (8),
    .CLK_HZ(DISP_CLK_HZ)
  ) u_disp (
    .clk        (clk_epower),
    .rst_n      (disp_rst_n),
    .wr_valid   (disp_wr_valid),
    .wr_x       (disp_wr_x),
    .wr_y       (disp_wr_y),
    .wr_rgb     (disp_wr_rgb),
    .wr_ready   (disp_wr_ready),
    .pix_valid  (pix_valid),
    .frame_start(pix_frame_start),
    .pix_x      (pix_x),
    .pix_y      (pix_y),
    .pix_rgb    (pix_rgb)
  );

  // ---------------- ERouting grid ----------------
  logic [N-1:0][N_PORTS-1:0]      tx_clk, rx_clk;
  logic [N-1:0][N_PORTS-1:0][1:0] tx_d,   rx_d;

  for (genvar y = 0; y < MESH_Y; y++) begin : g_row
    for (genvar x = 0; x < MESH_X; x++) begin : g_col
      localparam int unsigned n = y * MESH_X + x;
      logic node_rst_n;

      reset_sync u_rst (.clk(clk_node[n]), .rst_n(sys_rst_n), .rst_n_sync(node_rst_n));

      erouting_node #(
        .WORD_W     (WORD_W),
        .FIFO_AW    (FIFO_AW),
        .CFG_BYTES  (CFG_BYTES),
        .CFG_TIMEOUT(CFG_TIMEOUT)
      ) u_node (
        .clk         (clk_node[n]),
        .rst_n       (node_rst_n),
        .lnk_tx_clk  (tx_clk[n]),
        .lnk_tx_d    (tx_d[n]),
        .lnk_rx_clk  (rx_clk[n]),
        .lnk_rx_d    (rx_d[n]),
        .lnk_overflow(lnk_overflow[n]),
        .rt_out_valid(rt_out_valid[n]),
        .rt_out_data (rt_out_data[n]),
        .rt_out_ready(rt_out_ready[n]),
        .rt_in_valid (rt_in_valid[n]),
        .rt_in_data  (rt_in_data[n]),
        .rt_in_ready (rt_in_ready[n]),
        .cfg_start   (cfg_start[n]),
        .cfg_slot    (cfg_slot[n]),
        .cfg_busy    (cfg_busy[n]),
        .cfg_ok      (cfg_ok[n]),
        .cfg_err     (cfg_err[n]),
        .flash_rd    (flash_rd[n]),
        .flash_addr  (flash_addr[n]),
        .flash_rvalid(flash_rvalid[n]),
        .flash_rdata (flash_rdata[n]),
        .ecell_prog_b(ecell_prog_b[n]),
        .ecell_init_b(ecell_init_b[n]),
        .ecell_cclk  (ecell_cclk[n]),
        .ecell_din   (ecell_din[n]),
        .ecell_done  (ecell_done[n])
      );

      // North side
      if (y == 0) begin : g_n_edge
        assign north_tx_clk[x]       = tx_clk[n][PORT_N];
        assign north_tx_d[x]         = tx_d[n][PORT_N];
        assign rx_clk[n][PORT_N]     = north_rx_clk[x];
        assign rx_d[n][PORT_N]       = north_rx_d[x];
      end else begin : g_n_link
        assign rx_clk[n][PORT_N]     = tx_clk[n - MESH_X][PORT_S];
        assign rx_d[n][PORT_N]       = tx_d[n - MESH_X][PORT_S];
      end
      // South side
      if (y == MESH_Y - 1) begin : g_s_edge
        assign south_tx_clk[x]       = tx_clk[n][PORT_S];
        assign south_tx_d[x]         = tx_d[n][PORT_S];
        assign rx_clk[n][PORT_S]     = south_rx_clk[x];
        assign rx_d[n][PORT_S]       = south_rx_d[x];
      end else begin : g_s_link
        assign rx_clk[n][PORT_S]     = tx_clk[n + MESH_X][PORT_N];
        assign rx_d[n][PORT_S]       = tx_d[n + MESH_X][PORT_N];
      end
      // West side
      if (x == 0) begin : g_w_edge
        assign west_tx_clk[y]        = tx_clk[n][PORT_W];
        assign west_tx_d[y]          = tx_d[n][PORT_W];
        assign rx_clk[n][PORT_W]     = west_rx_clk[y];
        assign rx_d[n][PORT_W]       = west_rx_d[y];
      end else begin : g_w_link
        assign rx_clk[n][PORT_W]     = tx_clk[n - 1][PORT_E];
        assign rx_d[n][PORT_W]       = tx_d[n - 1][PORT_E];
      end
      // East side
      if (x == MESH_X - 1) begin : g_e_edge
        assign east_tx_clk[y]        = tx_clk[n][PORT_E];
        assign east_tx_d[y]          = tx_d[n][PORT_E];
        assign rx_clk[n][PORT_E]     = east_rx_clk[y];
        assign rx_d[n][PORT_E]       = east_rx_d[y];
      end else begin : g_e_link
        assign rx_clk[n][PORT_E]     = tx_clk[n + 1][PORT_W];
        assign rx_d[n][PORT_E]       = tx_d[n + 1][PORT_W];
      end
      // ECell above
      assign ecell_tx_clk[n]         = tx_clk[n][PORT_LOCAL];
      assign ecell_tx_d[n]           = tx_d[n][PORT_LOCAL];
      assign rx_clk[n][PORT_LOCAL]   = ecell_rx_clk[n];
      assign rx_d[n][PORT_LOCAL]     = ecell_rx_d[n];
    end
  end
endmodule
