// erouting_node: the fixed logic of one ERouting FPGA.
//
// An ERouting FPGA is linked to its four cardinal neighbours and to the
// ECell board above it, each by one serial link per direction (forwarded
// clock plus two data pairs). This module holds the five transmitters, the
// five receivers and the controller that loads the ECell FPGA from the local
// flash. The packet router (a Hermes switch in the platform) is a separate
// core: it connects to the word streams rt_* and is not part of this module.
//
// Port index p follows confetti_pkg::port_e: 0 N, 1 E, 2 S, 3 W, 4 ECell.
// rt_out_*[p] is the stream of words to send out of port p (valid/ready);
// rt_in_*[p] is the stream of words received on port p (valid/ready, the
// data is the head of the receive FIFO). All rt_* signals, the flash port and
// the configuration command are in the clk domain; each link's receive side
// runs on the clock forwarded by the sender until its FIFO.
// lnk_overflow[p] is sticky: a word arrived on port p while its FIFO was full.
module erouting_node
  import confetti_pkg::*;
#(
  parameter int unsigned WORD_W      = 16,
  parameter int unsigned FIFO_AW     = 3,
  parameter int unsigned CFG_BYTES   = 130952,
  parameter int unsigned CFG_TIMEOUT = 100000
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // serial links, one per port and direction
  output logic [N_PORTS-1:0]        lnk_tx_clk,
  output logic [N_PORTS-1:0][1:0]   lnk_tx_d,
  input  logic [N_PORTS-1:0]        lnk_rx_clk,
  input  logic [N_PORTS-1:0][1:0]   lnk_rx_d,
  output logic [N_PORTS-1:0]        lnk_overflow,
  // router side: words to transmit
  input  logic [N_PORTS-1:0]              rt_out_valid,
  input  logic [N_PORTS-1:0][WORD_W-1:0]  rt_out_data,
  output logic [N_PORTS-1:0]              rt_out_ready,
  // router side: words received
  output logic [N_PORTS-1:0]              rt_in_valid,
  output logic [N_PORTS-1:0][WORD_W-1:0]  rt_in_data,
  input  logic [N_PORTS-1:0]              rt_in_ready,
  // ECell configuration command
  input  logic                      cfg_start,
  input  logic [3:0]                cfg_slot,
  output logic                      cfg_busy,
  output logic                      cfg_ok,
  output logic                      cfg_err,
  // local 16 Mbit flash
  output logic                      flash_rd,
  output logic [20:0]               flash_addr,
  input  logic                      flash_rvalid,
  input  logic [7:0]                flash_rdata,
  // ECell FPGA configuration lines
  output logic                      ecell_prog_b,
  input  logic                      ecell_init_b,
  output logic                      ecell_cclk,
  output logic                      ecell_din,
  input  logic                      ecell_done
);

  for (genvar p = 0; p < N_PORTS; p++) begin : g_port
    lvds_link_tx #(.WORD_W(WORD_W)) u_tx (
      .clk     (clk),
      .rst_n   (rst_n),
      .in_valid(rt_out_valid[p]),
      .in_data (rt_out_data[p]),
      .in_ready(rt_out_ready[p]),
      .lnk_clk (lnk_tx_clk[p]),
      .lnk_d   (lnk_tx_d[p])
    );
    lvds_link_rx #(.WORD_W(WORD_W), .FIFO_AW(FIFO_AW)) u_rx (
      .clk      (clk),
      .rst_n    (rst_n),
      .lnk_clk  (lnk_rx_clk[p]),
      .lnk_d    (lnk_rx_d[p]),
      .out_valid(rt_in_valid[p]),
      .out_data (rt_in_data[p]),
      .out_ready(rt_in_ready[p]),
      .overflow (lnk_overflow[p])
    );
  end

  ecell_config_ctrl #(
    .CFG_BYTES(CFG_BYTES),
    .TIMEOUT  (CFG_TIMEOUT)
  ) u_cfg (
    .clk         (clk),
    .rst_n       (rst_n),
    .start       (cfg_start),
    .slot        (cfg_slot),
    .busy        (cfg_busy),
    .done        (cfg_ok),
    .err         (cfg_err),
    .flash_rd    (flash_rd),
    .flash_addr  (flash_addr),
    .flash_rvalid(flash_rvalid),
    .flash_rdata (flash_rdata),
    .cfg_prog_b  (ecell_prog_b),
    .cfg_init_b  (ecell_init_b),
    .cfg_cclk    (ecell_cclk),
    .cfg_din     (ecell_din),
    .cfg_done    (ecell_done)
  );
endmodule
