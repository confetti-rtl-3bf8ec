// tb_display_framebuffer: self-checking test of the display framebuffer.
// Instance u_fast scans one pixel every 2 cycles. All 18 cells first paint
// their whole 8x8 square, then keep writing random pixels at random times,
// all competing for the one write port. A reference image, built from the
// cell-to-square rule, records every accepted write; every pixel of a full
// scanned frame must match it, in row-major order. No requesting cell may
// wait more than 18 cycles for its grant. Instance u_full has the default
// parameters: its frames must start every 499 968 cycles (100 Hz at 50 MHz).
module tb_display_framebuffer;
  localparam int unsigned W = 48, H = 24, NC = 18;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a falling edge applies the asynchronous resets
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [NC-1:0]       wv = '0, wr;
  logic [NC-1:0][2:0]  wx = '0, wy = '0;
  logic [NC-1:0][23:0] wc = '0;
  logic                pv, fs, pv2, fs2;
  logic [5:0]          px, px2;
  logic [4:0]          py, py2;
  logic [23:0]         prgb, prgb2;

  display_framebuffer #(.PIX_DIV(2)) u_fast (
    .clk(clk), .rst_n(rst_n), .wr_valid(wv), .wr_x(wx), .wr_y(wy), .wr_rgb(wc),
    .wr_ready(wr), .pix_valid(pv), .frame_start(fs), .pix_x(px), .pix_y(py), .pix_rgb(prgb));

  display_framebuffer u_full (
    .clk(clk), .rst_n(rst_n), .wr_valid('0), .wr_x('0), .wr_y('0), .wr_rgb('0),
    .wr_ready(), .pix_valid(pv2), .frame_start(fs2), .pix_x(px2), .pix_y(py2), .pix_rgb(prgb2));

  logic [23:0] ref_img [W*H];
  int          painted [NC];
  int          waiting [NC];
  bit          acc [NC];       // write c accepted at the last rising edge
  bit          writing = 1'b1, checking = 1'b0, active = 1'b0;
  int          expect_idx = 0, frame_pix = 0;

  // Record accepted writes; measure grant waits.
  always @(posedge clk) begin
    for (int c = 0; c < NC; c++) begin
      if (wv[c] && wr[c]) begin
        ref_img[((c / 6) * 8 + int'(wy[c])) * W + (c % 6) * 8 + int'(wx[c])] = wc[c];
        waiting[c] = 0;
        acc[c] = 1'b1;
      end else if (wv[c]) begin
        waiting[c]++;
        if (waiting[c] == NC + 1) begin
          failures++;
          $display("cell %0d waited more than %0d cycles", c, NC);
        end
      end
    end
  end

  // Drive writers.
  always @(negedge clk) begin
    if (rst_n) begin
      for (int c = 0; c < NC; c++) begin
        if (!wv[c] || acc[c]) begin
          acc[c] = 1'b0;
          if (writing && (painted[c] < 64 || $urandom_range(0, 3) == 0)) begin
            wv[c] = 1'b1;
            if (painted[c] < 64) begin
              wx[c] = 3'(painted[c] % 8);
              wy[c] = 3'(painted[c] / 8);
              painted[c]++;
            end else begin
              wx[c] = 3'($urandom);
              wy[c] = 3'($urandom);
            end
            wc[c] = 24'($urandom);
          end else begin
            wv[c] = 1'b0;
          end
        end
      end
    end
  end

  // Scan checker.
  always @(posedge clk) begin
    if (checking && pv && fs && frame_pix == 0) active = 1'b1;
    if (active && pv && frame_pix < W * H) begin
      checks++;
      if (int'(py) * W + int'(px) != expect_idx || prgb !== ref_img[expect_idx]) begin
        failures++;
        if (failures < 10)
          $display("pixel %0d: got (%0d,%0d) %h want %h", expect_idx, px, py, prgb, ref_img[expect_idx]);
      end
      expect_idx++;
      frame_pix++;
    end
  end

  int t_first = -1, t_second = -1, cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (fs2) begin
      if (t_first < 0) t_first = cyc;
      else if (t_second < 0) t_second = cyc;
    end
  end

  initial begin
    foreach (painted[c]) begin painted[c] = 0; waiting[c] = 0; acc[c] = 1'b0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (3000) @(negedge clk);
    writing = 1'b0;
    repeat (NC + 4) @(negedge clk);
    checks++;
    if (wv != '0) begin failures++; $display("writes still pending"); end
    // Check one whole frame from its start.
    checking = 1'b1;
    repeat (5 * W * H) @(negedge clk);
    checking = 1'b0;
    checks++;
    if (frame_pix != W * H) begin failures++; $display("scanned %0d pixels", frame_pix); end
    // Default-parameter refresh rate.
    wait (t_second >= 0);
    checks++;
    if (t_second - t_first != 434 * W * H) begin
      failures++;
      $display("frame period %0d cycles", t_second - t_first);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1_200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
