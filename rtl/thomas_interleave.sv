// Thomas interleave stage: collects G tridiagonal systems of size N that
// arrive one after another (row 0..N-1 of system 0, then system 1, ...) in a
// ping-pong buffer, so that the forward stage can read them interleaved
// (row i of systems 0..G-1, then row i+1, ...). The buffer holds the a, b, c
// and d coefficients, 2*G*N words each; while the forward stage works on one
// group of G systems the next group is written into the other bank.
//
// Input: valid/ready stream of coef_t, one row per cycle. Output: the read
// port of the buffer, driven by thomas_forward (bank full flags, one-cycle
// read latency). Row i of system s is stored at address s*N + i.
//
// Follows the method: systems arrive one after another and are issued row-
// interleaved. Own choice: the address layout s*N + i.
module thomas_interleave
  import tridsolv_pkg::*;
#(
  parameter int unsigned G = 32,
  parameter int unsigned N = 128,
  localparam int unsigned AW = $clog2(G * N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  coef_t         in_data,
  // read port towards the forward stage
  input  logic          rd_en,
  input  logic          rd_bank,
  input  logic [AW-1:0] rd_addr,
  output coef_t         rd_data,
  input  logic          rd_release,
  output logic [1:0]    full
);
  logic          wr_en, wr_bank, wr_commit;
  logic [AW-1:0] wr_idx;

  bank_writer #(.COUNT(G * N)) u_wr (
    .clk, .rst_n, .in_valid, .in_ready, .wr_idx, .wr_en, .wr_bank, .wr_commit, .full
  );

  pingpong_buffer #(.DW($bits(coef_t)), .DEPTH(G * N)) u_buf (
    .clk, .rst_n,
    .wr_en, .wr_bank, .wr_addr(wr_idx), .wr_data(in_data), .wr_commit,
    .rd_en, .rd_bank, .rd_addr, .rd_data, .rd_release, .full
  );
endmodule
