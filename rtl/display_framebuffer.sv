// display_framebuffer: framebuffer and refresh scan of the EDisplay.
//
// The display on top of an UltraStack has 48 x 24 RGB pixels of 24 bits and
// is refreshed 100 times per second. Each ECell owns the 8 x 8 square right
// above it: with the ECells on a 6 x 3 grid, cell c = cy*6 + cx owns pixels
// x = 8*cx .. 8*cx+7, y = 8*cy .. 8*cy+7. The framebuffer is one memory of
// 48*24 words of 24 bits (27 648 bits, one block RAM on the FPGA).
//
// Writes: each cell has a valid/ready port carrying a pixel position inside
// its own square and a colour, so no cell can draw outside its square. A
// round-robin arbiter takes one write per cycle; wr_ready[c] is the grant.
// Scan: one pixel is read every PIX_DIV cycles, in row-major order, and
// presented on pix_* with pix_valid for one cycle, one read latency after
// the read; frame_start marks the first pixel of each frame. PIX_DIV is
// CLK_HZ / (REFRESH_HZ*48*24) = 434 at 50 MHz, a frame every 499 968 cycles.
// How the pixel stream drives the LEDs (PWM, row multiplexing) belongs to
// the LED board and is not part of this module.
module display_framebuffer #(
  parameter int unsigned DISP_W     = 48,
  parameter int unsigned DISP_H     = 24,
  parameter int unsigned SQ         = 8,
  parameter int unsigned CLK_HZ     = 50_000_000,
  parameter int unsigned REFRESH_HZ = 100,
  parameter int unsigned PIX_DIV    = CLK_HZ / (REFRESH_HZ * DISP_W * DISP_H),
  localparam int unsigned CELLS_X   = DISP_W / SQ,
  localparam int unsigned N_CELLS   = CELLS_X * (DISP_H / SQ),
  localparam int unsigned SQ_W      = $clog2(SQ),
  localparam int unsigned X_W       = $clog2(DISP_W),
  localparam int unsigned Y_W       = $clog2(DISP_H),
  localparam int unsigned NPIX      = DISP_W * DISP_H,
  localparam int unsigned A_W       = $clog2(NPIX)
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // per-cell write ports
  input  logic [N_CELLS-1:0]             wr_valid,
  input  logic [N_CELLS-1:0][SQ_W-1:0]   wr_x,
  input  logic [N_CELLS-1:0][SQ_W-1:0]   wr_y,
  input  logic [N_CELLS-1:0][23:0]       wr_rgb,
  output logic [N_CELLS-1:0]             wr_ready,
  // refresh scan
  output logic                           pix_valid,
  output logic                           frame_start,
  output logic [X_W-1:0]                 pix_x,
  output logic [Y_W-1:0]                 pix_y,
  output logic [23:0]                    pix_rgb
);
  logic [23:0] fb [NPIX];

  // ---- write side ----
  logic [N_CELLS-1:0] gnt;
  logic [A_W-1:0]     waddr;
  logic [23:0]        wdata;
  logic               we;

  rr_arbiter #(.N(N_CELLS)) u_arb (
    .clk(clk), .rst_n(rst_n), .req(wr_valid), .advance(1'b1), .gnt(gnt)
  );
  assign wr_ready = gnt;

  always_comb begin
    we    = 1'b0;
    waddr = '0;
    wdata = '0;
    for (int unsigned c = 0; c < N_CELLS; c++) begin
      if (gnt[c]) begin
        we    = 1'b1;
        waddr = A_W'(((c / CELLS_X) * SQ + int'(wr_y[c])) * DISP_W
                     + (c % CELLS_X) * SQ + int'(wr_x[c]));
        wdata = wr_rgb[c];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (we) fb[waddr] <= wdata;
  end

  // ---- scan side ----
  localparam int unsigned DIV_W = $clog2(PIX_DIV + 1);
  logic [DIV_W-1:0] div;
  logic [X_W-1:0]   sx;
  logic [Y_W-1:0]   sy;
  logic [A_W-1:0]   raddr;
  logic             rd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div         <= '0;
      sx          <= '0;
      sy          <= '0;
      raddr       <= '0;
      rd          <= 1'b0;
      pix_valid   <= 1'b0;
      frame_start <= 1'b0;
      pix_x       <= '0;
      pix_y       <= '0;
    end else begin
      rd          <= 1'b0;
      pix_valid   <= rd;
      frame_start <= rd && raddr == '0;
      if (div == DIV_W'(PIX_DIV - 1)) begin
        div   <= '0;
        rd    <= 1'b1;
        raddr <= A_W'(sy) * A_W'(DISP_W) + A_W'(sx);
        pix_x <= sx;
        pix_y <= sy;
        if (sx == X_W'(DISP_W - 1)) begin
          sx <= '0;
          sy <= (sy == Y_W'(DISP_H - 1)) ? '0 : sy + 1'b1;
        end else begin
          sx <= sx + 1'b1;
        end
      end else begin
        div <= div + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rd) pix_rgb <= fb[raddr];
  end

  initial assert (DISP_W % SQ == 0 && DISP_H % SQ == 0 && PIX_DIV >= 2)
    else $error("display_framebuffer: display must be whole squares, PIX_DIV >= 2");
endmodule
