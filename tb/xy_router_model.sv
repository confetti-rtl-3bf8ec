// xy_router_model: behavioural stand-in for the packet router of one
// ERouting FPGA, used only by the system testbenches. The platform uses an
// existing router core there; this model only moves single-word packets so
// that traffic can cross the grid. Word layout used by the testbenches: the
// top XW bits are the destination x, the next YW bits the destination y,
// the rest is payload (XW = 3, YW = 2 within one stack). Routing is
// dimension-ordered (first x, then y); a word for this node goes to the
// ECell port. Each output holds one word; inputs are served in fixed order
// and an input whose output is busy waits. stall freezes all inputs.
// Counts of words sent per output port are kept in sent[].
module xy_router_model #(
  parameter int unsigned X = 0,
  parameter int unsigned Y = 0,
  parameter int unsigned W = 16,
  parameter int unsigned XW = 3,
  parameter int unsigned YW = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                stall,
  input  logic [4:0]          in_valid,
  input  logic [4:0][W-1:0]   in_data,
  output logic [4:0]          in_ready,
  output logic [4:0]          out_valid,
  output logic [4:0][W-1:0]   out_data,
  input  logic [4:0]          out_ready,
  output int                  sent [5]
);
  function automatic int route(input logic [W-1:0] w);
    int dx, dy;
    dx = int'(w[W-1 -: XW]);
    dy = int'(w[W-1-XW -: YW]);
    if (dx > int'(X)) return 1;  // E
    if (dx < int'(X)) return 3;  // W
    if (dy > int'(Y)) return 2;  // S
    if (dy < int'(Y)) return 0;  // N
    return 4;                    // ECell
  endfunction

  logic [4:0] claim;
  int         dest [5];

  always_comb begin
    logic [4:0] taken;
    taken    = '0;
    in_ready = '0;
    for (int p = 0; p < 5; p++) begin
      dest[p] = route(in_data[p]);
      if (!stall && in_valid[p] && !taken[dest[p]]
          && (!out_valid[dest[p]] || out_ready[dest[p]])) begin
        taken[dest[p]] = 1'b1;
        in_ready[p]    = 1'b1;
      end
    end
    claim = in_ready;
  end

  initial foreach (sent[q]) sent[q] = 0;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= '0;
      out_data  <= '0;
    end else begin
      for (int q = 0; q < 5; q++)
        if (out_valid[q] && out_ready[q]) begin
          out_valid[q] <= 1'b0;
          sent[q] = sent[q] + 1;
        end
      for (int p = 0; p < 5; p++)
        if (claim[p]) begin
          out_valid[dest[p]] <= 1'b1;
          out_data[dest[p]]  <= in_data[p];
        end
    end
  end
endmodule
