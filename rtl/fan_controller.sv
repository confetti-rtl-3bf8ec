// fan_controller: switches on only the fans near a thermal hot spot.
//
// A fan board carries six to eight fans, each switched on its own. The
// temperature sensors are taken as ordered along the fan board, and fan f
// watches the contiguous group of sensors
// f*N_TEMP/N_FANS .. (f+1)*N_TEMP/N_FANS - 1. A fan turns on when the
// hottest sensor of its group reaches T_ON and turns off when that sensor
// has fallen to T_OFF or below (hysteresis, so a fan does not chatter).
// force_all turns every fan on. The grouping, the thresholds and the 8-bit
// degree Celsius readings are this design's choices. fan_on is registered:
// it follows a temperature change by one cycle.
module fan_controller #(
  parameter int unsigned N_FANS = 8,
  parameter int unsigned N_TEMP = 45,
  parameter logic [7:0]  T_ON   = 8'd55,
  parameter logic [7:0]  T_OFF  = 8'd45
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [N_TEMP-1:0][7:0] temp,
  input  logic                   force_all,
  output logic [N_FANS-1:0]      fan_on
);
  logic [N_FANS-1:0][7:0] zone_max;

  always_comb begin
    for (int unsigned f = 0; f < N_FANS; f++) begin
      zone_max[f] = '0;
      for (int unsigned s = 0; s < N_TEMP; s++)
        if (s * N_FANS >= f * N_TEMP && s * N_FANS < (f + 1) * N_TEMP
            && temp[s] > zone_max[f])
          zone_max[f] = temp[s];
    end
  end

  logic [N_FANS-1:0] hot;   // hysteresis state per fan

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hot    <= '0;
      fan_on <= '0;
    end else begin
      for (int unsigned f = 0; f < N_FANS; f++) begin
        if (zone_max[f] >= T_ON)       hot[f] <= 1'b1;
        else if (zone_max[f] <= T_OFF) hot[f] <= 1'b0;
        fan_on[f] <= force_all || zone_max[f] >= T_ON
                     || (hot[f] && zone_max[f] > T_OFF);
      end
    end
  end
endmodule
