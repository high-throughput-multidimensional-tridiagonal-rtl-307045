// RHS of the 2D ADI heat iteration: the explicit 5-point stencil
//   d[j][x] = lambda * (((u[j][x-1] + u[j][x+1]) + (u[j-1][x] + u[j+1][x]))
//                       - 4 u[j][x])
// on interior points, d = 0 on the mesh boundary (Dirichlet boundary).
//
// u arrives row-major, V points per beat, X/V beats per row, Y rows per mesh,
// meshes of a batch back to back. Two line buffers (rows j-1 and j) form the
// window: when beat k of row j+1 arrives, beat k of row j is produced. Row 0
// of each mesh produces nothing; after the last row the module spends X/V
// cycles emitting the zero boundary row without taking input. The output is
// one register stage (valid/ready), in the same order as the input.
//
// Follows the method: an explicit stencil with window (line) buffers
// computes the right-hand side. Own choice: the 5-point weights, the
// summation order and the zero boundary.
module stencil2d
  import tridsolv_pkg::*;
#(
  parameter int unsigned X      = 128,
  parameter int unsigned Y      = 128,
  parameter fp_t         LAMBDA = FP_ONE
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
  localparam int unsigned KW  = (BPL > 1) ? $clog2(BPL) : 1;
  localparam int unsigned JW  = $clog2(Y);

  beat_t lb_prev [BPL];     // row j-1
  beat_t lb_cur  [BPL];     // row j
  fp_t   cur_left;          // old row j, point V*k-1
  logic [KW-1:0] k;
  logic [JW-1:0] j;         // row index of the incoming beat
  logic flush;
  logic in_fire, emit, can_out;
  beat_t d;

  assign can_out  = !out_valid || out_ready;
  assign in_ready = can_out && !flush;
  assign in_fire  = in_valid && in_ready;
  assign emit     = (in_fire && j != '0) || (flush && can_out);

  always_comb begin
    fp_t left, right, up, down, center;
    for (int p = 0; p < V; p++) begin
      int unsigned xg;
      xg     = 32'(k) * V + p;
      center = lb_cur[k][p];
      left   = (p == 0) ? cur_left : lb_cur[k][p-1];
      if (p == V - 1) right = (32'(k) == BPL - 1) ? FP_ZERO : lb_cur[KW'(32'(k) + 1)][0];
      else            right = lb_cur[k][p+1];
      up     = lb_prev[k][p];
      down   = in_data[p];
      if (flush || j == JW'(1) || xg == 0 || xg == X - 1) d[p] = FP_ZERO;
      else d[p] = fp_mul(LAMBDA, fp_sub(fp_add(fp_add(left, right), fp_add(up, down)),
                                        fp_mul(FP_FOUR, center)));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k <= '0; j <= '0; flush <= 1'b0; out_valid <= 1'b0;
    end else begin
      if (emit) out_valid <= 1'b1;
      else if (out_ready) out_valid <= 1'b0;
      if (in_fire || (flush && can_out)) begin
        if (k == KW'(BPL - 1)) begin
          k <= '0;
          if (flush) flush <= 1'b0;
          else if (j == JW'(Y - 1)) begin
            j <= '0;
            flush <= 1'b1;
          end else j <= j + 1'b1;
        end else k <= k + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (emit) out_data <= d;
    if (in_fire) begin
      lb_prev[k] <= lb_cur[k];
      lb_cur[k]  <= in_data;
      cur_left   <= lb_cur[k][V-1];
    end
  end

  if (X % V != 0 || X < 2 * V) begin : g_param_check
    $error("stencil2d: X must be a multiple of V, at least 2V");
  end
endmodule
