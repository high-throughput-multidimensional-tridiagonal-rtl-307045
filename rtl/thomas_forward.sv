// Thomas forward stage: the forward elimination of the Thomas algorithm over
// G interleaved systems of size N,
//   r = 1 / (b_i - a_i c*_{i-1});  d*_i = r (d_i - a_i d*_{i-1});  c*_i = r c_i
// with c*_{-1} = d*_{-1} = 0 (4 multiplications, 1 division, 2 subtractions).
//
// Once a full group is waiting in the interleave buffer and an output bank is
// free, it reads row i of systems 0..G-1, then row i+1, one row per cycle. The
// arithmetic result leaves an LF-stage pipeline (the datapath latency l_f);
// because row i+1 of a system is read G cycles after row i, LF < G lets the
// G-entry c*/d* memories of the previous row supply the loop-carried values
// without a stall. Results go into this stage's own ping-pong buffer (c*, d*)
// at address s*N + i, read by thomas_backward.
//
// The arithmetic is written as one combinational expression followed by LF
// register stages, to be spread over the datapath by register retiming.
//
// Follows the method: interleaving g systems row by row, one divide, four
// multiplies and two subtracts per row, and g saved previous-row values. Own
// choice: LF and how the latency is modelled.
module thomas_forward
  import tridsolv_pkg::*;
#(
  parameter int unsigned G  = 32,
  parameter int unsigned N  = 128,
  parameter int unsigned LF = 30,
  localparam int unsigned AW = $clog2(G * N),
  localparam int unsigned SW = (G > 1) ? $clog2(G) : 1,
  localparam int unsigned NW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // read port of the interleave buffer
  input  logic [1:0]    in_full,
  output logic          in_rd_en,
  output logic          in_rd_bank,
  output logic [AW-1:0] in_rd_addr,
  input  coef_t         in_rd_data,
  output logic          in_rd_release,
  // read port of this stage's c*/d* buffer
  input  logic          rd_en,
  input  logic          rd_bank,
  input  logic [AW-1:0] rd_addr,
  output cd_t           rd_data,
  input  logic          rd_release,
  output logic [1:0]    full
);
  typedef struct packed {
    logic [SW-1:0] s;
    logic [NW-1:0] i;
    cd_t           r;
  } pipe_t;

  logic          rb, wbi, wbw;
  logic [SW-1:0] s_cnt;
  logic [NW-1:0] i_cnt;
  logic          last;
  logic          p_v;
  logic [SW-1:0] p_s;
  logic [NW-1:0] p_i;
  fp_t           cprev [G];
  fp_t           dprev [G];
  fp_t           a_eff, cp, dp, rr;
  cd_t           res;
  pipe_t         pipe [LF];
  logic          pipe_v [LF];
  pipe_t         o;
  logic          o_v;

  // ---- issue: interleaved read of one group --------------------------------
  assign in_rd_en      = in_full[rb] && !full[wbi];
  assign in_rd_bank    = rb;
  assign in_rd_addr    = AW'(32'(s_cnt) * N + 32'(i_cnt));
  assign last          = (i_cnt == NW'(N - 1)) && (s_cnt == SW'(G - 1));
  assign in_rd_release = in_rd_en && last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rb <= 1'b0; wbi <= 1'b0; s_cnt <= '0; i_cnt <= '0;
      p_v <= 1'b0; p_s <= '0; p_i <= '0;
    end else begin
      p_v <= in_rd_en;
      p_s <= s_cnt;
      p_i <= i_cnt;
      if (in_rd_en) begin
        if (s_cnt == SW'(G - 1)) begin
          s_cnt <= '0;
          i_cnt <= (i_cnt == NW'(N - 1)) ? '0 : i_cnt + 1'b1;
        end else s_cnt <= s_cnt + 1'b1;
        if (last) begin
          rb  <= ~rb;
          wbi <= ~wbi;
        end
      end
    end
  end

  // ---- forward elimination of one row -------------------------------------
  always_comb begin
    a_eff = (p_i == '0) ? FP_ZERO : in_rd_data.a;
    cp    = (p_i == '0) ? FP_ZERO : cprev[p_s];
    dp    = (p_i == '0) ? FP_ZERO : dprev[p_s];
    rr    = fp_div(FP_ONE, fp_sub(in_rd_data.b, fp_mul(a_eff, cp)));
    res.d = fp_mul(rr, fp_sub(in_rd_data.d, fp_mul(a_eff, dp)));
    res.c = fp_mul(rr, in_rd_data.c);
  end

  // ---- LF-stage result pipeline -------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < LF; k++) pipe_v[k] <= 1'b0;
    end else begin
      pipe_v[0] <= p_v;
      for (int k = 1; k < LF; k++) pipe_v[k] <= pipe_v[k-1];
    end
  end
  always_ff @(posedge clk) begin
    pipe[0].s <= p_s;
    pipe[0].i <= p_i;
    pipe[0].r <= res;
    for (int k = 1; k < LF; k++) begin
      pipe[k].s <= pipe[k-1].s;
      pipe[k].i <= pipe[k-1].i;
      pipe[k].r <= pipe[k-1].r;
    end
  end
  assign o   = pipe[LF-1];
  assign o_v = pipe_v[LF-1];

  // ---- loop-carried values and result buffer ------------------------------
  always_ff @(posedge clk) begin
    if (o_v) begin
      cprev[o.s] <= o.r.c;
      dprev[o.s] <= o.r.d;
    end
  end

  logic wr_commit;
  assign wr_commit = o_v && (o.i == NW'(N - 1)) && (o.s == SW'(G - 1));
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) wbw <= 1'b0;
    else if (wr_commit) wbw <= ~wbw;
  end

  pingpong_buffer #(.DW($bits(cd_t)), .DEPTH(G * N)) u_buf (
    .clk, .rst_n,
    .wr_en(o_v), .wr_bank(wbw), .wr_addr(AW'(32'(o.s) * N + 32'(o.i))), .wr_data(o.r),
    .wr_commit,
    .rd_en, .rd_bank, .rd_addr, .rd_data, .rd_release, .full
  );

  // The loop-carried value of a system must be written back before its next
  // row is read.
  if (LF < 1 || LF >= G) begin : g_param_check
    $error("thomas_forward needs 1 <= LF < G");
  end
endmodule
