// ecell_cfg_model: behavioural model of an ECell FPGA's slave-serial
// configuration port. PROG_B low clears it and pulls INIT_B low; INIT_B is
// released INIT_DELAY cycles after PROG_B returns high. Bits on DIN are
// taken on rising CCLK edges, MSB first; every full byte is reported on
// byte_valid/byte_out. After EXPECT_BYTES bytes and 8 more CCLK edges DONE
// goes high. NEVER_INIT / NEVER_DONE make it fail for error tests.
module ecell_cfg_model #(
  parameter int unsigned EXPECT_BYTES = 64,
  parameter int unsigned INIT_DELAY   = 10,
  parameter bit          NEVER_INIT   = 1'b0,
  parameter bit          NEVER_DONE   = 1'b0
) (
  input  logic       clk,
  input  logic       prog_b,
  output logic       init_b,
  input  logic       cclk,
  input  logic       din,
  output logic       done,
  output logic       byte_valid,
  output logic [7:0] byte_out,
  output int         bytes_rx
);
  int         init_cnt = 0, bits = 0, extra = 0;
  logic [7:0] sh = '0;
  logic       cclk_q = 1'b0;

  initial begin
    init_b = 1'b1; done = 1'b0; byte_valid = 1'b0; byte_out = '0; bytes_rx = 0;
  end

  always @(posedge clk) begin
    byte_valid <= 1'b0;
    cclk_q     <= cclk;
    if (!prog_b) begin
      init_b   <= 1'b0;
      done     <= 1'b0;
      init_cnt <= 0;
      bits     <= 0;
      extra    <= 0;
      bytes_rx <= 0;
    end else if (!init_b) begin
      init_cnt <= init_cnt + 1;
      if (init_cnt >= INIT_DELAY && !NEVER_INIT) init_b <= 1'b1;
    end else if (cclk && !cclk_q) begin
      if (bytes_rx < EXPECT_BYTES) begin
        sh   <= {sh[6:0], din};
        bits <= bits + 1;
        if (bits % 8 == 7) begin
          byte_valid <= 1'b1;
          byte_out   <= {sh[6:0], din};
          bytes_rx   <= bytes_rx + 1;
        end
      end else begin
        extra <= extra + 1;
        if (extra == 7 && !NEVER_DONE) done <= 1'b1;
      end
    end
  end
endmodule
