// VxV blocks to rows (x-dim solve, output side): the inverse of
// rows_to_blocks. Transposed results arrive block by block (for block column
// k, beat k of line 0 .. V-1) and are written to their place in a ping-pong
// buffer of V x-lines; a full bank is read out line after line, so results
// leave in the row-major order of the mesh.
//
// Follows the method: the block-to-row reordering after the x-solve. Own
// choice: a ping-pong buffer with a strided write address.
module blocks_to_rows
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
  localparam int unsigned BPL = X / V;
  localparam int unsigned CNT = V * BPL;
  localparam int unsigned AW  = $clog2(CNT);

  logic [1:0] full;
  logic wr_en, wr_bank, wr_commit, rd_en, rd_bank, rd_release;
  logic [AW-1:0] wr_idx, wr_addr, rd_idx;
  beat_t rd_data;

  bank_writer #(.COUNT(CNT)) u_wr (
    .clk, .rst_n, .in_valid, .in_ready, .wr_idx, .wr_en, .wr_bank, .wr_commit, .full
  );
  strided_addr #(.INNER(V), .OUTER(BPL), .STRIDE(BPL), .AW(AW)) u_addr (
    .clk, .rst_n, .step(wr_en), .addr(wr_addr)
  );
  pingpong_buffer #(.DW($bits(beat_t)), .DEPTH(CNT)) u_buf (
    .clk, .rst_n, .wr_en, .wr_bank, .wr_addr, .wr_data(in_data), .wr_commit,
    .rd_en, .rd_bank, .rd_addr(rd_idx), .rd_data, .rd_release, .full
  );
  bank_reader #(.COUNT(CNT), .DW($bits(beat_t))) u_rd (
    .clk, .rst_n, .full, .rd_en, .rd_bank, .rd_idx, .rd_release, .rd_data,
    .out_valid, .out_ready, .out_data
  );

  if (X % V != 0) begin : g_param_check
    $error("blocks_to_rows: X must be a multiple of V");
  end
endmodule
