// Column to row transpose (y-dim solve, output side): the inverse of
// row_to_col. y-line results arrive column block by column block (for k =
// 0 .. X/V-1, rows 0 .. Y-1 of columns V*k .. V*k+V-1) and are written to
// their place in a ping-pong buffer holding one X x Y plane; a full plane is
// read out row-major.
//
// Follows the method: the column-to-row reordering after the y-solve. Own
// choice: a ping-pong plane buffer with a strided write address.
module col_to_row
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
  logic [AW-1:0] wr_idx, wr_addr, rd_idx;
  beat_t rd_data;

  bank_writer #(.COUNT(CNT)) u_wr (
    .clk, .rst_n, .in_valid, .in_ready, .wr_idx, .wr_en, .wr_bank, .wr_commit, .full
  );
  strided_addr #(.INNER(Y), .OUTER(BPL), .STRIDE(BPL), .AW(AW)) u_addr (
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
    $error("col_to_row: X must be a multiple of V");
  end
endmodule
