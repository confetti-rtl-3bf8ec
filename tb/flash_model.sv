// flash_model: behavioural model of the 16 Mbit configuration flash seen
// through the controller's read port. Instead of storing 2 Mbyte, the byte
// at address a is a fixed function of a (flash_byte below), which the
// testbenches use as their reference too. A read request is answered
// LAT cycles later with rvalid for one cycle.
module flash_model #(
  parameter int unsigned LAT = 4
) (
  input  logic        clk,
  input  logic        rd,
  input  logic [20:0] addr,
  output logic        rvalid,
  output logic [7:0]  rdata
);
  function automatic logic [7:0] flash_byte(input logic [20:0] a);
    return 8'(a * 7) ^ 8'(a >> 8) ^ 8'(a >> 17) ^ 8'h5A;
  endfunction

  logic [LAT-1:0]       v_pipe = '0;
  logic [LAT-1:0][7:0]  d_pipe = '0;

  always_ff @(posedge clk) begin
    v_pipe <= {v_pipe[LAT-2:0], rd};
    d_pipe <= {d_pipe[LAT-2:0], flash_byte(addr)};
  end
  assign rvalid = v_pipe[LAT-1];
  assign rdata  = d_pipe[LAT-1];
endmodule
