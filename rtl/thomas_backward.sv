// Thomas backward stage: back substitution over G interleaved systems,
//   u_{N-1} = d*_{N-1};   u_i = d*_i - c*_i u_{i+1}   (i = N-2 .. 0)
// (one multiplication and one subtraction per row).
//
// When a group of forward results (c*, d*) is complete and an output bank is
// free, rows are read in reverse order: row N-1 of systems 0..G-1, then row
// N-2, and so on. The result leaves an LB-stage pipeline (latency l_b); LB < G
// lets a G-entry memory hold u_{i+1} of every system. u is written to this
// stage's own ping-pong buffer at address s*N + i, from which thomas_solver
// streams it out one system after another. As forward and backward work on
// different banks, both run at the same time on consecutive groups.
//
// Follows the method: back substitution over an interleaved group, starting
// only once the forward pass of the group is complete. Own choice: LB, and
// how the latency is modelled.
module thomas_backward
  import tridsolv_pkg::*;
#(
  parameter int unsigned G  = 32,
  parameter int unsigned N  = 128,
  parameter int unsigned LB = 10,
  localparam int unsigned AW = $clog2(G * N),
  localparam int unsigned SW = (G > 1) ? $clog2(G) : 1,
  localparam int unsigned NW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // read port of the forward stage's c*/d* buffer
  input  logic [1:0]    in_full,
  output logic          in_rd_en,
  output logic          in_rd_bank,
  output logic [AW-1:0] in_rd_addr,
  input  cd_t           in_rd_data,
  output logic          in_rd_release,
  // read port of this stage's u buffer
  input  logic          rd_en,
  input  logic          rd_bank,
  input  logic [AW-1:0] rd_addr,
  output fp_t           rd_data,
  input  logic          rd_release,
  output logic [1:0]    full
);
  typedef struct packed {
    logic [SW-1:0] s;
    logic [NW-1:0] i;
    fp_t           u;
  } pipe_t;

  logic          rb, wbi, wbw;
  logic [SW-1:0] s_cnt;
  logic [NW-1:0] i_cnt;
  logic          last;
  logic          p_v;
  logic [SW-1:0] p_s;
  logic [NW-1:0] p_i;
  fp_t           uprev [G];
  fp_t           res;
  pipe_t         pipe [LB];
  logic          pipe_v [LB];
  pipe_t         o;
  logic          o_v;

  // ---- issue: interleaved read of one group, last row first ---------------
  assign in_rd_en      = in_full[rb] && !full[wbi];
  assign in_rd_bank    = rb;
  assign in_rd_addr    = AW'(32'(s_cnt) * N + 32'(i_cnt));
  assign last          = (i_cnt == '0) && (s_cnt == SW'(G - 1));
  assign in_rd_release = in_rd_en && last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rb <= 1'b0; wbi <= 1'b0; s_cnt <= '0; i_cnt <= NW'(N - 1);
      p_v <= 1'b0; p_s <= '0; p_i <= '0;
    end else begin
      p_v <= in_rd_en;
      p_s <= s_cnt;
      p_i <= i_cnt;
      if (in_rd_en) begin
        if (s_cnt == SW'(G - 1)) begin
          s_cnt <= '0;
          i_cnt <= (i_cnt == '0) ? NW'(N - 1) : i_cnt - 1'b1;
        end else s_cnt <= s_cnt + 1'b1;
        if (last) begin
          rb  <= ~rb;
          wbi <= ~wbi;
        end
      end
    end
  end

  // ---- back substitution of one row ---------------------------------------
  always_comb begin
    if (p_i == NW'(N - 1)) res = in_rd_data.d;
    else res = fp_sub(in_rd_data.d, fp_mul(in_rd_data.c, uprev[p_s]));
  end

  // ---- LB-stage result pipeline -------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < LB; k++) pipe_v[k] <= 1'b0;
    end else begin
      pipe_v[0] <= p_v;
      for (int k = 1; k < LB; k++) pipe_v[k] <= pipe_v[k-1];
    end
  end
  always_ff @(posedge clk) begin
    pipe[0].s <= p_s;
    pipe[0].i <= p_i;
    pipe[0].u <= res;
    for (int k = 1; k < LB; k++) begin
      pipe[k].s <= pipe[k-1].s;
      pipe[k].i <= pipe[k-1].i;
      pipe[k].u <= pipe[k-1].u;
    end
  end
  assign o   = pipe[LB-1];
  assign o_v = pipe_v[LB-1];

  always_ff @(posedge clk) if (o_v) uprev[o.s] <= o.u;

  logic wr_commit;
  assign wr_commit = o_v && (o.i == '0) && (o.s == SW'(G - 1));
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) wbw <= 1'b0;
    else if (wr_commit) wbw <= ~wbw;
  end

  pingpong_buffer #(.DW(W), .DEPTH(G * N)) u_buf (
    .clk, .rst_n,
    .wr_en(o_v), .wr_bank(wbw), .wr_addr(AW'(32'(o.s) * N + 32'(o.i))), .wr_data(o.u),
    .wr_commit,
    .rd_en, .rd_bank, .rd_addr, .rd_data, .rd_release, .full
  );

  if (LB < 1 || LB >= G) begin : g_param_check
    $error("thomas_backward needs 1 <= LB < G");
  end
endmodule
