// 2D ADI compute unit: F_U iterations of the ADI time loop unrolled into a
// chain of adi2d_stage pipelines, so that u passes through F_U iterations
// per trip between external memory and the FPGA. A batch of meshes streamed
// through once therefore advances F_U time steps; n_iter steps take
// n_iter / F_U trips.
//
// Follows the method: unrolling the iteration loop into F_U chained stages.
// Own choice: the stages are joined by plain streams with no buffering in
// between.
module adi2d_cu
  import tridsolv_pkg::*;
#(
  parameter int unsigned F_U = 3,
  parameter int unsigned X   = 128,
  parameter int unsigned Y   = 128,
  parameter int unsigned G   = 32,
  parameter int unsigned LF  = 30,
  parameter int unsigned LB  = 10,
  parameter fp_t LAMBDA = 32'h3F80_0000,
  parameter fp_t COEF_A = 32'hBF00_0000,
  parameter fp_t COEF_B = 32'h4000_0000,
  parameter fp_t COEF_C = 32'hBF00_0000
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  beat_t in_data,
  output logic  out_valid,
  input  logic  out_ready,
  output beat_t out_data
);
  logic  v [F_U+1];
  logic  r [F_U+1];
  beat_t d [F_U+1];

  assign v[0] = in_valid;
  assign in_ready = r[0];
  assign d[0] = in_data;
  assign out_valid = v[F_U];
  assign r[F_U] = out_ready;
  assign out_data = d[F_U];

  for (genvar s = 0; s < F_U; s++) begin : g_iter
    adi2d_stage #(.X(X), .Y(Y), .G(G), .LF(LF), .LB(LB), .LAMBDA(LAMBDA),
                  .COEF_A(COEF_A), .COEF_B(COEF_B), .COEF_C(COEF_C)) u_stage (
      .clk, .rst_n, .in_valid(v[s]), .in_ready(r[s]), .in_data(d[s]),
      .out_valid(v[s+1]), .out_ready(r[s+1]), .out_data(d[s+1]));
  end
endmodule
