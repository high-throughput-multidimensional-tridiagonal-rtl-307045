// Row to column transpose (y-dim solve): buffers a whole X x Y plane of the
// mesh, which arrives row-major (X/V beats per row), in a ping-pong buffer
// and reads it along the y-lines: for column block k = 0 .. X/V-1 it reads
// beat k of rows 0 .. Y-1. In each output beat the V points belong to V
// different y-lines (columns V*k .. V*k+V-1), so lane l of the Thomas solver
// receives the rows of column V*k+l in order and no point transpose is
// needed. The next plane is written while one is read.
//
// Follows the method: an XY plane is buffered on chip and read along
// y-lines. Own choice: the beat layout (lane l is x-column 8m+l) and the
// address order.
module row_to_col
  import tridsolv_pkg::*;
#(
  parameter int unsigned X = 128,
  parameter int unsigned Y = 128
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
  localparam int unsigned CNT = BPL * Y;
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
  strided_addr #(.INNER(Y), .OUTER(BPL), .STRIDE(BPL), .AW(AW)) u_addr (
    .clk, .rst_n, .step(rd_en), .addr(rd_addr)
  );
  bank_reader #(.COUNT(CNT), .DW($bits(beat_t))) u_rd (
    .clk, .rst_n, .full, .rd_en, .rd_bank, .rd_idx, .rd_release, .rd_data,
    .out_valid, .out_ready, .out_data
  );

  if (X % V != 0) begin : g_param_check
    $error("row_to_col: X must be a multiple of V");
  end
endmodule
