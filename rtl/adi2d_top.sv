// 2D ADI heat-diffusion accelerator: N_CU independent compute units, each an
// unrolled chain of F_U ADI iterations (adi2d_cu), for batches of X x Y
// FP32 meshes. Each unit has its own V-point (256-bit) stream of u in and
// out, the ports that external-memory read and write engines would drive;
// the batch is split between the units.
//
// Follows the method: several independent compute units of F_U unrolled
// iterations (3 x 3 for FP32). Own choice: each unit gets a plain
// valid/ready stream instead of external-memory read and write modules.
module adi2d_top
  import tridsolv_pkg::*;
#(
  parameter int unsigned N_CU = 3,
  parameter int unsigned F_U  = 3,
  parameter int unsigned X    = 128,
  parameter int unsigned Y    = 128,
  parameter int unsigned G    = 32,
  parameter int unsigned LF   = 30,
  parameter int unsigned LB   = 10,
  parameter fp_t LAMBDA = 32'h3F80_0000,
  parameter fp_t COEF_A = 32'hBF00_0000,
  parameter fp_t COEF_B = 32'h4000_0000,
  parameter fp_t COEF_C = 32'hBF00_0000
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [N_CU-1:0]       in_valid,
  output logic [N_CU-1:0]       in_ready,
  input  beat_t [N_CU-1:0]      in_data,
  output logic [N_CU-1:0]       out_valid,
  input  logic [N_CU-1:0]       out_ready,
  output beat_t [N_CU-1:0]      out_data
);
  for (genvar c = 0; c < N_CU; c++) begin : g_cu
    adi2d_cu #(.F_U(F_U), .X(X), .Y(Y), .G(G), .LF(LF), .LB(LB), .LAMBDA(LAMBDA),
               .COEF_A(COEF_A), .COEF_B(COEF_B), .COEF_C(COEF_C)) u_cu (
      .clk, .rst_n,
      .in_valid(in_valid[c]), .in_ready(in_ready[c]), .in_data(in_data[c]),
      .out_valid(out_valid[c]), .out_ready(out_ready[c]), .out_data(out_data[c]));
  end
endmodule
