// lvds_link_tx: transmit half of a CONFETTI serial link.
//
// A link direction uses three differential pairs: one carries the sender's
// clock, the other two (D0, D1) carry data, so each clock cycle moves a
// two-bit symbol. At 500 Mbit/s per pair that is 1 Gbit/s of raw data per
// direction. The framing is this design's own: the line idles at symbol 00;
// a word is sent as one start symbol 11 followed by WORD_W/2 data symbols,
// most significant bits first, D1 carrying the higher bit of each pair.
// The receiver counts symbols after the start symbol, so data may contain 11.
//
// Interface: a valid/ready word input in the clk domain. A word is taken on
// a cycle with in_valid && in_ready; in_ready is high whenever no word is
// being sent, so back-to-back words take WORD_W/2+1 cycles each. lnk_d is
// registered and changes right after the rising edge of clk; lnk_clk is clk
// itself (on the FPGA it would leave through an output DDR flop to the LVDS
// driver), and the receiver samples D0/D1 on its falling edge.
module lvds_link_tx #(
  parameter int unsigned WORD_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [WORD_W-1:0] in_data,
  output logic              in_ready,
  output logic              lnk_clk,
  output logic [1:0]        lnk_d     // {D1, D0}
);
  import confetti_pkg::*;

  localparam int unsigned NSYM  = WORD_W / 2;
  localparam int unsigned CNT_W = $clog2(NSYM + 1);

  logic [WORD_W-1:0] shreg;
  logic [CNT_W-1:0]  remaining;   // data symbols still to send

  assign in_ready = (remaining == '0);
  assign lnk_clk  = clk;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg     <= '0;
      remaining <= '0;
      lnk_d     <= SYM_IDLE;
    end else if (remaining != '0) begin
      lnk_d     <= shreg[WORD_W-1 -: 2];
      shreg     <= shreg << 2;
      remaining <= remaining - 1'b1;
    end else if (in_valid) begin
      lnk_d     <= SYM_START;
      shreg     <= in_data;
      remaining <= CNT_W'(NSYM);
    end else begin
      lnk_d     <= SYM_IDLE;
    end
  end

  initial assert (WORD_W % 2 == 0 && WORD_W >= 4)
    else $error("lvds_link_tx: WORD_W must be even and at least 4");
endmodule
