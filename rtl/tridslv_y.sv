// y-dimension tridiagonal solve of the 2D ADI iteration: solves one system
// per y-line (size Y) of each X x Y mesh, coefficients generated on the fly.
//
// Data path (one V-point beat per cycle in the steady state):
//   row_to_col   buffer the XY plane, read it along y-lines; the V points of
//                a beat belong to V neighbouring y-lines, so no point
//                transpose is needed
//   coef_gen     attach a, b, c to each row
//   vec_thomas   V Thomas solvers, each interleaving G y-lines
//   col_to_row   buffer the solved plane, read it back row-major
// Lane l solves columns l, V+l, 2V+l, ... of each mesh; a group of the
// solver covers G such columns, taken from consecutive meshes of the batch
// when X/V < G, so the number of meshes times X/V must be a multiple of G.
//
// Follows the method: a plane transpose in front of and behind the
// vectorized solver, with no register transpose needed. Own choice: the
// coefficient generation position.
module tridslv_y
  import tridsolv_pkg::*;
#(
  parameter int unsigned X  = 128,
  parameter int unsigned Y  = 128,
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
  logic rc_v, rc_r, cg_v, cg_r, vt_v, vt_r;
  beat_t rc_d, vt_d;
  coef_t [V-1:0] cg_d;

  row_to_col #(.X(X), .Y(Y)) u_rc (
    .clk, .rst_n, .in_valid, .in_ready, .in_data,
    .out_valid(rc_v), .out_ready(rc_r), .out_data(rc_d));
  coef_gen #(.N(Y), .COEF_A(COEF_A), .COEF_B(COEF_B), .COEF_C(COEF_C)) u_cg (
    .clk, .rst_n, .in_valid(rc_v), .in_ready(rc_r), .in_data(rc_d),
    .out_valid(cg_v), .out_ready(cg_r), .out_data(cg_d));
  vec_thomas #(.G(G), .N(Y), .LF(LF), .LB(LB)) u_vt (
    .clk, .rst_n, .in_valid(cg_v), .in_ready(cg_r), .in_data(cg_d),
    .out_valid(vt_v), .out_ready(vt_r), .out_data(vt_d));
  col_to_row #(.X(X), .Y(Y)) u_cr (
    .clk, .rst_n, .in_valid(vt_v), .in_ready(vt_r), .in_data(vt_d),
    .out_valid, .out_ready, .out_data);
endmodule
