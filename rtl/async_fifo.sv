// async_fifo: dual-clock FIFO with Gray-coded pointers.
//
// Carries words from the write clock domain (the clock forwarded over a
// serial link) to the read clock domain (the receiving FPGA's own clock);
// the platform has no global clock, so every link crosses domains here.
// Pointers are ADDR_W+1 bits; each side synchronises the other's Gray
// pointer through two flops, so full and empty are conservative.
// Interface: write when wr_en and !full; the read side shows the head word
// on rd_data whenever !empty and pops it on rd_en. Both resets are
// active-low and must come from the same source, released per domain.
module async_fifo #(
  parameter int unsigned WIDTH  = 16,
  parameter int unsigned ADDR_W = 3
) (
  input  logic             wr_clk,
  input  logic             wr_rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             full,
  input  logic             rd_clk,
  input  logic             rd_rst_n,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty
);
  localparam int unsigned DEPTH = 1 << ADDR_W;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [ADDR_W:0]  wbin, wgray, rbin, rgray;
  logic [ADDR_W:0]  rgray_w1, rgray_w2, wgray_r1, wgray_r2;
  logic [ADDR_W:0]  wbin_nxt, rbin_nxt;

  function automatic logic [ADDR_W:0] bin2gray(input logic [ADDR_W:0] b);
    return b ^ (b >> 1);
  endfunction

  // Write side.
  assign wbin_nxt = wbin + (ADDR_W+1)'(wr_en && !full);
  always_ff @(posedge wr_clk or negedge wr_rst_n) begin
    if (!wr_rst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      wbin     <= wbin_nxt;
      wgray    <= bin2gray(wbin_nxt);
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
    end
  end
  always_ff @(posedge wr_clk) begin
    if (wr_en && !full) mem[wbin[ADDR_W-1:0]] <= wr_data;
  end
  // Full when the write pointer is one lap ahead of the read pointer.
  assign full = (wgray == {~rgray_w2[ADDR_W:ADDR_W-1], rgray_w2[ADDR_W-2:0]});

  // Read side.
  assign rbin_nxt = rbin + (ADDR_W+1)'(rd_en && !empty);
  always_ff @(posedge rd_clk or negedge rd_rst_n) begin
    if (!rd_rst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      rbin     <= rbin_nxt;
      rgray    <= bin2gray(rbin_nxt);
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
    end
  end
  assign empty   = (rgray == wgray_r2);
  assign rd_data = mem[rbin[ADDR_W-1:0]];
endmodule
