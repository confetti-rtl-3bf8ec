// ecell_config_ctrl: loads an ECell FPGA from the ERouting node's flash.
//
// Each ERouting FPGA owns a 16 Mbit flash that holds up to sixteen ECell
// configurations, so the flash is cut into sixteen equal slots of 1 Mbit
// (131072 bytes); slot s starts at byte s*SLOT_BYTES. On a start pulse the
// controller reads CFG_BYTES bytes of the chosen slot and shifts them into
// the ECell FPGA through its serial configuration port. The port protocol is
// this design's choice (the platform only speaks of "configuration lines"):
// the Xilinx slave-serial scheme, with PROG_B pulsed low, a wait for INIT_B
// to go high, data bits MSB first on DIN sampled on the rising edge of CCLK,
// and a wait for DONE while CCLK keeps running.
//
// Timing: CCLK runs at clk/2 (DIN changes while CCLK is low). The next byte
// is fetched from the flash while the current one is shifted, so CCLK does
// not pause as long as the flash answers within 13 cycles (16 clk cycles
// per byte). A full XC3S200
// bitstream (CFG_BYTES = 130952, 1 047 616 bits) then takes about 2.1
// million clk cycles: 21 ms with a 100 MHz clock, in line with the ~20 ms
// the platform quotes for a configuration.
// Flash port: flash_rd is a one-cycle request for the byte at flash_addr;
// the flash answers with flash_rvalid and flash_rdata some cycles later,
// one request outstanding at a time.
// Status: busy while loading; done or err (timeout of INIT_B or DONE) stay
// high until the next start. A start while busy is ignored.
module ecell_config_ctrl #(
  parameter int unsigned FLASH_BITS   = 16 * 1024 * 1024,
  parameter int unsigned N_SLOTS      = 16,
  parameter int unsigned CFG_BYTES    = 130952,
  parameter int unsigned PROG_CYCLES  = 50,
  parameter int unsigned TIMEOUT      = 100000,
  localparam int unsigned FLASH_BYTES = FLASH_BITS / 8,
  localparam int unsigned SLOT_BYTES  = FLASH_BYTES / N_SLOTS,
  localparam int unsigned ADDR_W      = $clog2(FLASH_BYTES),
  localparam int unsigned SLOT_W      = $clog2(N_SLOTS)
) (
  input  logic              clk,
  input  logic              rst_n,
  // command
  input  logic              start,
  input  logic [SLOT_W-1:0] slot,
  output logic              busy,
  output logic              done,
  output logic              err,
  // flash read port
  output logic              flash_rd,
  output logic [ADDR_W-1:0] flash_addr,
  input  logic              flash_rvalid,
  input  logic [7:0]        flash_rdata,
  // ECell FPGA serial configuration port
  output logic              cfg_prog_b,
  input  logic              cfg_init_b,
  output logic              cfg_cclk,
  output logic              cfg_din,
  input  logic              cfg_done
);
  typedef enum logic [2:0] {
    S_IDLE, S_PROG, S_WAIT_INIT, S_LOAD, S_WAIT_DONE
  } state_e;

  localparam int unsigned CNT_W = $clog2(CFG_BYTES + 1);
  localparam int unsigned TO_W  = $clog2(TIMEOUT + PROG_CYCLES + 1);

  state_e            state;
  logic [ADDR_W-1:0] base;
  logic [CNT_W-1:0]  fetched, sent;
  logic              pending, buf_valid;
  logic [7:0]        buf_byte, shreg;
  logic [3:0]        bits;       // bits of shreg still to send
  logic [TO_W-1:0]   timer;

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      base       <= '0;
      fetched    <= '0;
      sent       <= '0;
      pending    <= 1'b0;
      buf_valid  <= 1'b0;
      buf_byte   <= '0;
      shreg      <= '0;
      bits       <= '0;
      timer      <= '0;
      done       <= 1'b0;
      err        <= 1'b0;
      flash_rd   <= 1'b0;
      flash_addr <= '0;
      cfg_prog_b <= 1'b1;
      cfg_cclk   <= 1'b0;
      cfg_din    <= 1'b1;
    end else begin
      flash_rd <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            base       <= ADDR_W'(slot) * ADDR_W'(SLOT_BYTES);
            fetched    <= '0;
            sent       <= '0;
            pending    <= 1'b0;
            buf_valid  <= 1'b0;
            bits       <= '0;
            timer      <= '0;
            done       <= 1'b0;
            err        <= 1'b0;
            cfg_prog_b <= 1'b0;
            state      <= S_PROG;
          end
        end
        S_PROG: begin
          timer <= timer + 1'b1;
          if (timer == TO_W'(PROG_CYCLES - 1)) begin
            cfg_prog_b <= 1'b1;
            timer      <= '0;
            state      <= S_WAIT_INIT;
          end
        end
        S_WAIT_INIT: begin
          // INIT_B may still be low from the PROG_B pulse for a few cycles.
          timer <= timer + 1'b1;
          if (cfg_init_b && timer > TO_W'(2)) begin
            timer <= '0;
            state <= S_LOAD;
          end else if (timer == TO_W'(TIMEOUT)) begin
            err   <= 1'b1;
            state <= S_IDLE;
          end
        end
        S_LOAD: begin
          // Prefetch: one flash request outstanding, one byte buffered.
          if (!buf_valid && !pending && fetched != CNT_W'(CFG_BYTES)) begin
            flash_rd   <= 1'b1;
            flash_addr <= base + ADDR_W'(fetched);
            fetched    <= fetched + 1'b1;
            pending    <= 1'b1;
          end
          if (pending && flash_rvalid) begin
            buf_byte  <= flash_rdata;
            buf_valid <= 1'b1;
            pending   <= 1'b0;
          end
          // Shifter: two clk cycles per CCLK period; DIN is set while
          // CCLK is low and the ECell samples it on the rising edge.
          if (cfg_cclk) begin
            cfg_cclk <= 1'b0;
            if (bits == 4'd1 && buf_valid) begin
              shreg     <= buf_byte;
              cfg_din   <= buf_byte[7];
              buf_valid <= 1'b0;
              bits      <= 4'd8;
              sent      <= sent + 1'b1;
            end else begin
              shreg   <= shreg << 1;
              cfg_din <= shreg[6];
              bits    <= bits - 1'b1;
            end
          end else if (bits != '0) begin
            cfg_cclk <= 1'b1;
          end else if (buf_valid) begin
            shreg     <= buf_byte;
            cfg_din   <= buf_byte[7];
            buf_valid <= 1'b0;
            bits      <= 4'd8;
            sent      <= sent + 1'b1;
          end else if (sent == CNT_W'(CFG_BYTES)) begin
            timer <= '0;
            state <= S_WAIT_DONE;
          end
        end
        S_WAIT_DONE: begin
          // Keep clocking until the ECell reports DONE.
          cfg_din  <= 1'b1;
          cfg_cclk <= !cfg_cclk;
          timer    <= timer + 1'b1;
          if (cfg_done) begin
            cfg_cclk <= 1'b0;
            done     <= 1'b1;
            state    <= S_IDLE;
          end else if (timer == TO_W'(TIMEOUT)) begin
            cfg_cclk <= 1'b0;
            err      <= 1'b1;
            state    <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
