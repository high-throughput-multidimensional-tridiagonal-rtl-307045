// Rows to VxV blocks (x-dim solve): buffers V consecutive x-lines of X points
// (X/V beats each) in a ping-pong buffer and reads them back block by block:
// for block column k = 0 .. X/V-1 it gives beat k of line 0, line 1, ...,
// line V-1. Each group of V output beats is one VxV block ready to be
// transposed so that every Thomas lane receives points of its own line. One
// bank holds V lines; the next V lines are written while a bank is read.
//
// Follows the method: 8 x-lines are buffered and fed to an 8x8 transpose.
// Own choice: the ping-pong buffer and the block read order.
module rows_to_blocks
  import tridsolv_pkg::*;
#(
  parameter int unsigned X = 128
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
  localparam int unsigned BPL = X / V;        // beats per line
  localparam int unsigned CNT = V * BPL;      // beats per bank
  localparam int unsigned AW  = $clog2(CNT);

  logic [1:0] full;
  logic wr_en, wr_bank, wr_commit, rd_en, rd_bank, rd_release;
  logic [AW-1:0] wr_idx, rd_idx, rd_addr;
  beat_t rd_data;

  bank_writer #(.COUNT(CNT)) u_wr (
    .clk, .rst_n, .in_valid, .in_ready, .wr_idx, .wr_en, .wr_bank, .wr_commit, .full
  );
  pingpong_buffer #(.DW($bits(beat_t)), .DEPTH(CNT)) u_buf (
    .clk, .rst_n, .wr_en, .wr_bank, .wr_addr(wr_idx), .wr_data(in_data), .wr_commit,
    .rd_en, .rd_bank, .rd_addr, .rd_data, .rd_release, .full
  );
  strided_addr #(.INNER(V), .OUTER(BPL), .STRIDE(BPL), .AW(AW)) u_addr (
    .clk, .rst_n, .step(rd_en), .addr(rd_addr)
  );
  bank_reader #(.COUNT(CNT), .DW($bits(beat_t))) u_rd (
    .clk, .rst_n, .full, .rd_en, .rd_bank, .rd_idx, .rd_release, .rd_data,
    .out_valid, .out_ready, .out_data
  );

  if (X % V != 0) begin : g_param_check
    $error("rows_to_blocks: X must be a multiple of V");
  end
endmodule
