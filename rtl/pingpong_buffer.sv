// Ping-pong (double) buffer: a dual-port memory split into two banks so that
// one stage can fill one bank while the next stage reads the other.
//
// Each bank carries a "full" flag. The writer stores words into bank wr_bank
// and, after its last word, pulses wr_commit to mark that bank full; the
// reader reads bank rd_bank (read data one cycle after rd_en) and pulses
// rd_release to hand the bank back. A writer must only write a bank that is
// not full and a reader must only read a full one; the very first read
// therefore waits for the very first write to complete, as in the batched
// Thomas solver the buffer was made for. Both stages keep their own bank
// pointers and toggle them after commit / release.
//
// DEPTH words of DW bits per bank; total storage 2*DEPTH words.
//
// Follows the method: double-buffered banks between solver stages. Own
// choice: the full-flag commit/release protocol and the one-cycle read
// latency.
module pingpong_buffer #(
  parameter int unsigned DW    = 32,
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // write port
  input  logic          wr_en,
  input  logic          wr_bank,
  input  logic [AW-1:0] wr_addr,
  input  logic [DW-1:0] wr_data,
  input  logic          wr_commit,
  // read port
  input  logic          rd_en,
  input  logic          rd_bank,
  input  logic [AW-1:0] rd_addr,
  output logic [DW-1:0] rd_data,
  input  logic          rd_release,
  // bank status
  output logic [1:0]    full
);
  localparam int unsigned MW2 = $clog2(2 * DEPTH);
  logic [DW-1:0]  mem [2*DEPTH];
  logic [MW2-1:0] wa, ra;

  // bank 1 starts at word DEPTH, so DEPTH need not be a power of two
  assign wa = wr_bank ? MW2'(DEPTH + 32'(wr_addr)) : MW2'(wr_addr);
  assign ra = rd_bank ? MW2'(DEPTH + 32'(rd_addr)) : MW2'(rd_addr);

  always_ff @(posedge clk) begin
    if (wr_en) mem[wa] <= wr_data;
    if (rd_en) rd_data <= mem[ra];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) full <= '0;
    else begin
      if (rd_release) full[rd_bank] <= 1'b0;
      if (wr_commit)  full[wr_bank] <= 1'b1;
    end
  end

  // Protocol rules of the two ports.
  a_wr_free:  assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> !full[wr_bank]);
  a_rd_full:  assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> full[rd_bank]);
  a_commit:   assert property (@(posedge clk) disable iff (!rst_n) wr_commit |-> !full[wr_bank]);
  a_release:  assert property (@(posedge clk) disable iff (!rst_n) rd_release |-> full[rd_bank]);
endmodule
