// rr_arbiter: round-robin arbiter, one grant per cycle.
// gnt is one-hot (or zero when nothing is requested) and combinational from
// req. The requester granted last has the lowest priority next time: when
// advance is high and a grant is given, the search for the next grant starts
// just after the granted index.
module rr_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] gnt
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] ptr;      // highest-priority index
  logic [IW-1:0] gidx;
  logic          any;

  always_comb begin
    gnt  = '0;
    gidx = '0;
    any  = 1'b0;
    for (int unsigned k = 0; k < N; k++) begin
      logic [IW-1:0] i;
      i = IW'((int'(ptr) + k) % N);
      if (!any && req[i]) begin
        any     = 1'b1;
        gidx    = IW'(i);
        gnt[i]  = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              ptr <= '0;
    else if (advance && any) ptr <= (gidx == IW'(N - 1)) ? '0 : gidx + 1'b1;
  end
endmodule
