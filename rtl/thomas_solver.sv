// Batched, interleaved Thomas solver for tridiagonal systems of size N.
//
// Systems arrive one after another as a stream of rows (a, b, c, d), one row
// per cycle, and leave as a stream of solutions u in the same order. Inside,
// three stages joined by ping-pong buffers work on consecutive groups of G
// systems at once:
//   thomas_interleave  stores a group of G systems;
//   thomas_forward     forward elimination, the G systems interleaved row by
//                      row so that the loop-carried dependency (latency LF)
//                      is hidden, G >= LF;
//   thomas_backward    back substitution in reverse row order (latency LB);
// and an output reader streams u system by system. With a steady input each
// stage takes G*N cycles per group, so B systems (B a multiple of G) take
// about (3 + B/G) * G*N cycles, one row per cycle in the steady state.
// Memory: seven words (a, b, c, d, c*, d*, u) per row, each 2*G*N deep, plus
// three G-entry memories of loop-carried values.
//
// a_0 and c_{N-1} are ignored (taken as zero). Streams are valid/ready.
//
// Follows the method: interleave, forward and backward stages joined by
// ping-pong buffers, with the latency (3 + ceil(B/G)) * G * N. Own choice:
// the output reader and the stream handshake.
module thomas_solver
  import tridsolv_pkg::*;
#(
  parameter int unsigned G  = 32,
  parameter int unsigned N  = 128,
  parameter int unsigned LF = 30,
  parameter int unsigned LB = 10
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  coef_t in_data,
  output logic  out_valid,
  input  logic  out_ready,
  output fp_t   out_data
);
  localparam int unsigned AW = $clog2(G * N);

  logic [1:0]    il_full, fw_full, bw_full;
  logic          il_rd_en, il_rd_bank, il_rd_release;
  logic [AW-1:0] il_rd_addr;
  coef_t         il_rd_data;
  logic          fw_rd_en, fw_rd_bank, fw_rd_release;
  logic [AW-1:0] fw_rd_addr;
  cd_t           fw_rd_data;
  logic          bw_rd_en, bw_rd_bank, bw_rd_release;
  logic [AW-1:0] bw_rd_idx;
  fp_t           bw_rd_data;

  thomas_interleave #(.G(G), .N(N)) u_il (
    .clk, .rst_n, .in_valid, .in_ready, .in_data,
    .rd_en(il_rd_en), .rd_bank(il_rd_bank), .rd_addr(il_rd_addr), .rd_data(il_rd_data),
    .rd_release(il_rd_release), .full(il_full)
  );

  thomas_forward #(.G(G), .N(N), .LF(LF)) u_fw (
    .clk, .rst_n,
    .in_full(il_full), .in_rd_en(il_rd_en), .in_rd_bank(il_rd_bank), .in_rd_addr(il_rd_addr),
    .in_rd_data(il_rd_data), .in_rd_release(il_rd_release),
    .rd_en(fw_rd_en), .rd_bank(fw_rd_bank), .rd_addr(fw_rd_addr), .rd_data(fw_rd_data),
    .rd_release(fw_rd_release), .full(fw_full)
  );

  thomas_backward #(.G(G), .N(N), .LB(LB)) u_bw (
    .clk, .rst_n,
    .in_full(fw_full), .in_rd_en(fw_rd_en), .in_rd_bank(fw_rd_bank), .in_rd_addr(fw_rd_addr),
    .in_rd_data(fw_rd_data), .in_rd_release(fw_rd_release),
    .rd_en(bw_rd_en), .rd_bank(bw_rd_bank), .rd_addr(bw_rd_idx), .rd_data(bw_rd_data),
    .rd_release(bw_rd_release), .full(bw_full)
  );

  // u is stored at s*N + i, so reading addresses 0 .. G*N-1 in order gives
  // the systems one after another.
  bank_reader #(.COUNT(G * N), .DW(W)) u_out (
    .clk, .rst_n, .full(bw_full),
    .rd_en(bw_rd_en), .rd_bank(bw_rd_bank), .rd_idx(bw_rd_idx), .rd_release(bw_rd_release),
    .rd_data(bw_rd_data), .out_valid, .out_ready, .out_data
  );

  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_data));
endmodule
