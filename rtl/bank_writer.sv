// Stream-to-bank writer for a ping-pong buffer: accepts a valid/ready stream
// and stores COUNT words into the current bank, at the address the parent
// computes from the running index (idx = 0 .. COUNT-1, exposed as wr_idx).
// After the COUNT-th word the bank is committed and the writer moves to the
// other bank. in_ready is low while the current bank is still full.
//
// Own helper: the commit-on-last-word protocol is this design's choice.
module bank_writer #(
  parameter int unsigned COUNT = 16,
  localparam int unsigned IW   = (COUNT > 1) ? $clog2(COUNT) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  output logic [IW-1:0] wr_idx,
  output logic          wr_en,
  output logic          wr_bank,
  output logic          wr_commit,
  input  logic [1:0]    full
);
  logic bank;
  logic [IW-1:0] idx;

  assign in_ready  = !full[bank];
  assign wr_en     = in_valid && in_ready;
  assign wr_bank   = bank;
  assign wr_idx    = idx;
  assign wr_commit = wr_en && (idx == IW'(COUNT - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bank <= 1'b0;
      idx  <= '0;
    end else if (wr_en) begin
      if (wr_commit) begin
        idx  <= '0;
        bank <= ~bank;
      end else idx <= idx + 1'b1;
    end
  end
endmodule
