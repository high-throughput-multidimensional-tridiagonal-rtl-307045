// Bank-to-stream reader for a ping-pong buffer: once the current bank is
// full it reads COUNT words from it, at the address the parent computes from
// the running index (rd_idx = 0 .. COUNT-1), then releases the bank and moves
// to the other one. The memory's one-cycle read latency is hidden by a small
// output FIFO, so a word can leave every cycle while out_ready stays high;
// when out_ready drops, reads stop before the FIFO can overflow.
//
// Own helper: the handshake adapter between a ping-pong bank and a stream is
// this design's choice.
module bank_reader #(
  parameter int unsigned COUNT = 16,
  parameter int unsigned DW    = 32,
  localparam int unsigned IW   = (COUNT > 1) ? $clog2(COUNT) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [1:0]    full,
  output logic          rd_en,
  output logic          rd_bank,
  output logic [IW-1:0] rd_idx,
  output logic          rd_release,
  input  logic [DW-1:0] rd_data,
  output logic          out_valid,
  input  logic          out_ready,
  output logic [DW-1:0] out_data
);
  logic bank;
  logic [IW-1:0] idx;
  logic inflight;
  logic [DW-1:0] fifo [4];
  logic [1:0] head, tail;
  logic [2:0] cnt;
  logic pop;

  assign pop        = out_valid && out_ready;
  assign rd_en      = full[bank] && (32'(cnt) + 32'(inflight) <= 2);
  assign rd_bank    = bank;
  assign rd_idx     = idx;
  assign rd_release = rd_en && (idx == IW'(COUNT - 1));
  assign out_valid  = cnt != 0;
  assign out_data   = fifo[head];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bank <= 1'b0;
      idx <= '0;
      inflight <= 1'b0;
      head <= '0;
      tail <= '0;
      cnt <= '0;
    end else begin
      inflight <= rd_en;
      if (rd_en) begin
        if (rd_release) begin
          idx  <= '0;
          bank <= ~bank;
        end else idx <= idx + 1'b1;
      end
      if (inflight) tail <= tail + 1'b1;
      if (pop) head <= head + 1'b1;
      cnt <= cnt + 3'(inflight) - 3'(pop);
    end
  end

  always_ff @(posedge clk) if (inflight) fifo[tail] <= rd_data;

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) cnt <= 4);
endmodule
