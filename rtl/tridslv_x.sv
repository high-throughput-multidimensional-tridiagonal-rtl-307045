// x-dimension tridiagonal solve of the 2D ADI iteration: solves one system
// per x-line (size X) of each mesh, with coefficients generated on the fly.
//
// Data path (one V-point beat per cycle in the steady state):
//   rows_to_blocks  buffer V x-lines, read them as VxV blocks
//   transpose8x8    lane l now carries x-line l of the V buffered lines
//   coef_gen        attach a, b, c to each row
//   vec_thomas      V Thomas solvers, each interleaving G x-lines
//   transpose8x8    back to blocks of V points of one line
//   blocks_to_rows  back to row-major order
// Lane l solves x-lines l, l+V, l+2V, ... so a group of the solver covers
// V*G consecutive x-lines; the lines of all meshes of a batch stream through
// back to back, and the total number of lines must be a multiple of V*G.
//
// Follows the method: rows to blocks, transpose, solver, transpose, blocks
// to rows. Own choice: coefficient generation placed right after the input
// transpose.
module tridslv_x
  import tridsolv_pkg::*;
#(
  parameter int unsigned X  = 128,
  parameter int unsigned G  = 32,
  parameter int unsigned LF = 30,
  parameter int unsigned LB = 10,
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
  logic rb_v, rb_r, t1_v, t1_r, cg_v, cg_r, vt_v, vt_r, t2_v, t2_r;
  beat_t rb_d, t1_d, vt_d, t2_d;
  coef_t [V-1:0] cg_d;

  rows_to_blocks #(.X(X)) u_rb (
    .clk, .rst_n, .in_valid, .in_ready, .in_data,
    .out_valid(rb_v), .out_ready(rb_r), .out_data(rb_d));
  transpose8x8 u_t1 (
    .clk, .rst_n, .in_valid(rb_v), .in_ready(rb_r), .in_data(rb_d),
    .out_valid(t1_v), .out_ready(t1_r), .out_data(t1_d));
  coef_gen #(.N(X), .COEF_A(COEF_A), .COEF_B(COEF_B), .COEF_C(COEF_C)) u_cg (
    .clk, .rst_n, .in_valid(t1_v), .in_ready(t1_r), .in_data(t1_d),
    .out_valid(cg_v), .out_ready(cg_r), .out_data(cg_d));
  vec_thomas #(.G(G), .N(X), .LF(LF), .LB(LB)) u_vt (
    .clk, .rst_n, .in_valid(cg_v), .in_ready(cg_r), .in_data(cg_d),
    .out_valid(vt_v), .out_ready(vt_r), .out_data(vt_d));
  transpose8x8 u_t2 (
    .clk, .rst_n, .in_valid(vt_v), .in_ready(vt_r), .in_data(vt_d),
    .out_valid(t2_v), .out_ready(t2_r), .out_data(t2_d));
  blocks_to_rows #(.X(X)) u_br (
    .clk, .rst_n, .in_valid(t2_v), .in_ready(t2_r), .in_data(t2_d),
    .out_valid, .out_ready, .out_data);
endmodule
