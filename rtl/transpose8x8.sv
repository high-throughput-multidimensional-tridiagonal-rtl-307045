// VxV point transpose (V = 8: the 8x8 transpose of the x-dim solve). V input
// beats (rows of a VxV block) are collected in a load register set; with the
// V-th beat the whole block is moved, transposed, into an output register
// set in the same clock, and output beat j then holds point j of every input
// beat (output lane l = input beat l). While the output set drains, the next
// block loads, so one beat per cycle passes in the steady state, with a
// latency of V cycles. The same module turns x-line blocks into per-lane
// streams in front of the Thomas solvers and turns their results back.
//
// Follows the method: an 8x8 register transpose in front of the vectorized
// solver. Own choice: the double register set that keeps one beat per cycle.
module transpose8x8
  import tridsolv_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  beat_t in_data,
  output logic  out_valid,
  input  logic  out_ready,
  output beat_t out_data
);
  localparam int unsigned CW = $clog2(V + 1);
  localparam int unsigned IW = $clog2(V);

  beat_t ld [V-1];     // first V-1 beats of the block being loaded
  beat_t ob [V];       // transposed block being sent
  logic [CW-1:0] ld_cnt, ob_cnt;
  logic ob_free, in_fire, out_fire, move;

  assign out_fire  = out_valid && out_ready;
  assign ob_free   = (ob_cnt == '0) || (ob_cnt == CW'(1) && out_fire);
  assign in_ready  = (ld_cnt < CW'(V - 1)) || ob_free;
  assign in_fire   = in_valid && in_ready;
  assign move      = in_fire && (ld_cnt == CW'(V - 1));
  assign out_valid = ob_cnt != '0;
  assign out_data  = ob[IW'(V - 32'(ob_cnt))];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ld_cnt <= '0;
      ob_cnt <= '0;
    end else begin
      if (move) ld_cnt <= '0;
      else if (in_fire) ld_cnt <= ld_cnt + 1'b1;
      if (move) ob_cnt <= CW'(V);
      else if (out_fire) ob_cnt <= ob_cnt - 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (in_fire && !move) ld[IW'(ld_cnt)] <= in_data;
    if (move)
      for (int j = 0; j < V; j++)
        for (int l = 0; l < V; l++)
          ob[j][l] <= (l == V - 1) ? in_data[j] : ld[l][j];
  end
endmodule
