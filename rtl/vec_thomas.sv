// Vectorised Thomas solver: V batched Thomas solvers side by side, one per
// point of the V-point data path. Lane l receives the rows of its own
// systems, one row per beat, and all lanes advance together: a beat is taken
// only when every lane can take it and given out only when every lane has a
// result, which keeps the lanes in lock step. Each lane solves groups of G
// interleaved systems of size N (see thomas_solver).
//
// Follows the method: 8 Thomas solvers side by side as one vectorized
// solver. Own choice: all lanes share one handshake and stall together.
module vec_thomas
  import tridsolv_pkg::*;
#(
  parameter int unsigned G  = 32,
  parameter int unsigned N  = 128,
  parameter int unsigned LF = 30,
  parameter int unsigned LB = 10
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  coef_t [V-1:0]    in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output beat_t            out_data
);
  logic [V-1:0] l_in_ready, l_out_valid;

  assign in_ready  = &l_in_ready;
  assign out_valid = &l_out_valid;

  for (genvar l = 0; l < V; l++) begin : g_lane
    thomas_solver #(.G(G), .N(N), .LF(LF), .LB(LB)) u_solver (
      .clk, .rst_n,
      .in_valid(in_valid && in_ready), .in_ready(l_in_ready[l]), .in_data(in_data[l]),
      .out_valid(l_out_valid[l]), .out_ready(out_ready && out_valid), .out_data(out_data[l])
    );
  end
endmodule
