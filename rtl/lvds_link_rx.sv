// lvds_link_rx: receive half of a CONFETTI serial link.
//
// The sender forwards its clock on the third pair of the link; there is no
// global clock and no clock recovery. D0/D1 are captured on the falling edge
// of the forwarded clock (the middle of each symbol, since the sender
// launches on the rising edge), then a small state machine on the rising
// edge waits for the start symbol 11 and shifts in WORD_W/2 data symbols,
// most significant first. Each finished word is written into an
// asynchronous FIFO that hands it to the receiving FPGA's own clock.
//
// There is no flow control back to the sender over the link (the platform
// describes none); a word that arrives while the FIFO is full is dropped and
// the sticky overflow flag, synchronised into clk, goes high until reset.
// Interface: out_valid/out_data/out_ready in the clk domain; out_data shows
// the oldest word while out_valid is high and out_ready pops it. A word is
// visible on out_valid about four clk cycles after its last symbol.
module lvds_link_rx #(
  parameter int unsigned WORD_W  = 16,
  parameter int unsigned FIFO_AW = 3     // FIFO depth is 2**FIFO_AW words
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              lnk_clk,
  input  logic [1:0]        lnk_d,      // {D1, D0}
  output logic              out_valid,
  output logic [WORD_W-1:0] out_data,
  input  logic              out_ready,
  output logic              overflow
);
  import confetti_pkg::*;

  localparam int unsigned NSYM  = WORD_W / 2;
  localparam int unsigned CNT_W = $clog2(NSYM + 1);

  logic              lrst_n;            // reset in the link clock domain
  logic [1:0]        sym;
  logic [WORD_W-3:0] shreg;             // symbols received so far
  logic [CNT_W-1:0]  remaining;
  logic              wr_en;
  logic [WORD_W-1:0] wr_word;
  logic              full, empty;
  logic              ovf_lnk;
  logic [1:0]        ovf_sync;

  reset_sync u_rst (.clk(lnk_clk), .rst_n(rst_n), .rst_n_sync(lrst_n));

  // Centre-of-symbol capture.
  always_ff @(negedge lnk_clk or negedge lrst_n) begin
    if (!lrst_n) sym <= SYM_IDLE;
    else         sym <= lnk_d;
  end

  // Deframer.
  always_ff @(posedge lnk_clk or negedge lrst_n) begin
    if (!lrst_n) begin
      shreg     <= '0;
      remaining <= '0;
      wr_en     <= 1'b0;
      wr_word   <= '0;
      ovf_lnk   <= 1'b0;
    end else begin
      wr_en <= 1'b0;
      if (remaining != '0) begin
        shreg     <= (WORD_W-2)'({shreg, sym});
        remaining <= remaining - 1'b1;
        if (remaining == CNT_W'(1)) begin
          wr_en   <= 1'b1;
          wr_word <= {shreg, sym};
        end
      end else if (sym == SYM_START) begin
        remaining <= CNT_W'(NSYM);
      end
      if (wr_en && full) ovf_lnk <= 1'b1;
    end
  end

  async_fifo #(.WIDTH(WORD_W), .ADDR_W(FIFO_AW)) u_fifo (
    .wr_clk  (lnk_clk),
    .wr_rst_n(lrst_n),
    .wr_en   (wr_en),
    .wr_data (wr_word),
    .full    (full),
    .rd_clk  (clk),
    .rd_rst_n(rst_n),
    .rd_en   (out_ready),
    .rd_data (out_data),
    .empty   (empty)
  );

  assign out_valid = !empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ovf_sync <= '0;
    else        ovf_sync <= {ovf_sync[0], ovf_lnk};
  end
  assign overflow = ovf_sync[1];
endmodule
