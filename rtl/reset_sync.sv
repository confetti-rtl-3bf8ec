// reset_sync: brings an active-low reset into a clock domain.
// The reset asserts asynchronously and releases on the second rising edge of
// clk after rst_n goes high, so every flop of the domain leaves reset in the
// same cycle. Used for the receive side of a serial link, whose clock is the
// clock forwarded by the neighbouring FPGA.
module reset_sync (
  input  logic clk,
  input  logic rst_n,
  output logic rst_n_sync
);
  logic meta;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta       <= 1'b0;
      rst_n_sync <= 1'b0;
    end else begin
      meta       <= 1'b1;
      rst_n_sync <= meta;
    end
  end
endmodule
