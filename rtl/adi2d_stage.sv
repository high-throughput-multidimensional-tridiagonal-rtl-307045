// One iteration of the 2D ADI heat-diffusion method, fully pipelined:
//   d = RHS(u)  (stencil2d)
//   d = x-solve(d), then y-solve(d) (tridslv_x, tridslv_y, coefficients
//       a = A, b = B, c = C generated inside)
//   u = u + d
// The incoming u stream is forked: one copy feeds the stencil, the other
// waits in a delay FIFO until the matching solved d leaves the y-solve; the
// two are then joined and added point by point. The FIFO is sized for the
// largest number of beats the stencil and the two solves can hold together
// (two banks of every ping-pong buffer), so the fork never stalls the
// pipeline behind it. Streams are V-point beats, row-major, meshes of a
// batch back to back.
//
// Follows the method: the order stencil, x-solve, y-solve, accumulate, with
// u carried past the solves in a delay buffer. Own choice: the buffer is an
// on-chip FIFO with a depth computed from this design's buffers, not
// external memory.
module adi2d_stage
  import tridsolv_pkg::*;
#(
  parameter int unsigned X  = 128,
  parameter int unsigned Y  = 128,
  parameter int unsigned G  = 32,
  parameter int unsigned LF = 30,
  parameter int unsigned LB = 10,
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
  localparam int unsigned BPL = X / V;
  localparam int unsigned DELAY_DEPTH = BPL + 4 * X + 4 * V + 6 * G * (X + Y)
                                      + 4 * BPL * Y + 2 * (LF + LB) + 64;

  logic st_iv, st_ir, ff_iv, ff_ir, st_v, st_r, xs_v, xs_r, ys_v, ys_r, ff_v, ff_r;
  beat_t st_d, xs_d, ys_d, ff_d;

  // fork
  assign in_ready = st_ir && ff_ir;
  assign st_iv    = in_valid && ff_ir;
  assign ff_iv    = in_valid && st_ir;

  stencil2d #(.X(X), .Y(Y), .LAMBDA(LAMBDA)) u_rhs (
    .clk, .rst_n, .in_valid(st_iv), .in_ready(st_ir), .in_data,
    .out_valid(st_v), .out_ready(st_r), .out_data(st_d));
  tridslv_x #(.X(X), .G(G), .LF(LF), .LB(LB), .COEF_A(COEF_A), .COEF_B(COEF_B), .COEF_C(COEF_C)) u_xs (
    .clk, .rst_n, .in_valid(st_v), .in_ready(st_r), .in_data(st_d),
    .out_valid(xs_v), .out_ready(xs_r), .out_data(xs_d));
  tridslv_y #(.X(X), .Y(Y), .G(G), .LF(LF), .LB(LB), .COEF_A(COEF_A), .COEF_B(COEF_B), .COEF_C(COEF_C)) u_ys (
    .clk, .rst_n, .in_valid(xs_v), .in_ready(xs_r), .in_data(xs_d),
    .out_valid(ys_v), .out_ready(ys_r), .out_data(ys_d));
  delay_fifo #(.DW($bits(beat_t)), .DEPTH(DELAY_DEPTH)) u_delay (
    .clk, .rst_n, .in_valid(ff_iv), .in_ready(ff_ir), .in_data,
    .out_valid(ff_v), .out_ready(ff_r), .out_data(ff_d));

  // join and accumulate
  assign out_valid = ys_v && ff_v;
  assign ys_r      = out_ready && ff_v;
  assign ff_r      = out_ready && ys_v;
  always_comb
    for (int p = 0; p < V; p++) out_data[p] = fp_add(ff_d[p], ys_d[p]);
endmodule
