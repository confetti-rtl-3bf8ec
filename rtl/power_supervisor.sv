// power_supervisor: start-up sequencer and guard of an UltraStack.
//
// The EPower board supervises the stack: it switches on the DC/DC converters
// that make 1.2 V, 2.5 V and 3.3 V from the 5 V input, checks that every
// supply is stable, has the ERouting FPGAs configured, and then keeps
// watching the supplies and all temperature sensors. If any check fails,
// the whole stack is switched off. On the board this is firmware in a
// micro-controller; here it is a state machine with the same sequence:
//
//   OFF --power_on--> POWER_UP: all conv_en high; every pgood must be high
//       and stay high for STABLE_CYCLES, within PGOOD_TIMEOUT cycles.
//   POWER_UP --> CONFIG: rout_prog is pulsed for one cycle; every bit of
//       rout_done must rise within CFG_TIMEOUT cycles.
//   CONFIG --> RUN: running = 1. Any pgood low, or any temperature at or
//       above T_TRIP, leads to SHUTDOWN.
//   SHUTDOWN: all converters off; fault holds the cause. The state is kept
//       until power_on is released, then returns to OFF.
//   Releasing power_on in POWER_UP, CONFIG or RUN switches the converters
//       off and returns to OFF at once, with no fault.
// Temperatures are also checked during POWER_UP and CONFIG. Turning on all
// converters at once, the timeouts, the trip limit and the 8-bit degree
// Celsius readings are this design's choices.
module power_supervisor
  import confetti_pkg::*;
#(
  parameter int unsigned N_CONV        = 6,
  parameter int unsigned N_ROUT        = 18,
  parameter int unsigned N_TEMP        = 45,
  parameter int unsigned STABLE_CYCLES = 5000,
  parameter int unsigned PGOOD_TIMEOUT = 500000,
  parameter int unsigned CFG_TIMEOUT   = 5000000,
  parameter logic [7:0]  T_TRIP        = 8'd85
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         power_on,
  output logic [N_CONV-1:0]            conv_en,
  input  logic [N_CONV-1:0]            pgood,
  output logic                         rout_prog,
  input  logic [N_ROUT-1:0]            rout_done,
  input  logic [N_TEMP-1:0][7:0]       temp,
  output sup_state_e                   state,
  output fault_e                       fault,
  output logic                         running
);
  localparam int unsigned T_W = $clog2(CFG_TIMEOUT + PGOOD_TIMEOUT + 1);

  logic [T_W-1:0] timer, stable;
  logic           hot;

  always_comb begin
    hot = 1'b0;
    for (int unsigned i = 0; i < N_TEMP; i++)
      if (temp[i] >= T_TRIP) hot = 1'b1;
  end

  assign running = (state == SUP_RUN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= SUP_OFF;
      fault     <= FAULT_NONE;
      conv_en   <= '0;
      rout_prog <= 1'b0;
      timer     <= '0;
      stable    <= '0;
    end else begin
      rout_prog <= 1'b0;
      unique case (state)
        SUP_OFF: begin
          conv_en <= '0;
          if (power_on) begin
            fault   <= FAULT_NONE;
            conv_en <= '1;
            timer   <= '0;
            stable  <= '0;
            state   <= SUP_POWER_UP;
          end
        end
        SUP_POWER_UP: begin
          timer  <= timer + 1'b1;
          stable <= (&pgood) ? stable + 1'b1 : '0;
          if (hot) begin
            fault <= FAULT_TEMP;
            state <= SUP_SHUTDOWN;
          end else if ((&pgood) && stable == T_W'(STABLE_CYCLES - 1)) begin
            rout_prog <= 1'b1;
            timer     <= '0;
            state     <= SUP_CONFIG;
          end else if (timer == T_W'(PGOOD_TIMEOUT)) begin
            fault <= FAULT_PGOOD_TO;
            state <= SUP_SHUTDOWN;
          end
        end
        SUP_CONFIG: begin
          timer <= timer + 1'b1;
          if (!(&pgood)) begin
            fault <= FAULT_PGOOD;
            state <= SUP_SHUTDOWN;
          end else if (hot) begin
            fault <= FAULT_TEMP;
            state <= SUP_SHUTDOWN;
          end else if (&rout_done) begin
            state <= SUP_RUN;
          end else if (timer == T_W'(CFG_TIMEOUT)) begin
            fault <= FAULT_CFG_TO;
            state <= SUP_SHUTDOWN;
          end
        end
        SUP_RUN: begin
          if (!(&pgood)) begin
            fault <= FAULT_PGOOD;
            state <= SUP_SHUTDOWN;
          end else if (hot) begin
            fault <= FAULT_TEMP;
            state <= SUP_SHUTDOWN;
          end
        end
        SUP_SHUTDOWN: begin
          conv_en <= '0;
          if (!power_on) state <= SUP_OFF;
        end
        default: state <= SUP_OFF;
      endcase
      // Releasing power_on switches a stack that is starting or running off.
      if (!power_on && state != SUP_OFF && state != SUP_SHUTDOWN) begin
        conv_en <= '0;
        state   <= SUP_OFF;
      end
    end
  end

  // Converters are never on outside the powered states.
  a_off_when_down: assert property (@(posedge clk) disable iff (!rst_n)
    (state == SUP_OFF && !$past(power_on)) |-> conv_en == '0);
endmodule
