// Delay buffer for the ADI accumulation u = u + d: a first-in first-out
// buffer that carries the u values entering an ADI iteration past the RHS
// stencil and the x- and y-solves, so that each reaches the final adder
// together with its solved update d. DEPTH must cover every beat that can be
// held inside the solver pipeline at once, otherwise the pipeline would stall
// its own input. Valid/ready on both sides; memory array plus pointers.
//
// Follows the method: a FIFO delay buffer for u. Own choice: it is on-chip
// memory, not an external-memory FIFO.
module delay_fifo #(
  parameter int unsigned DW    = 256,
  parameter int unsigned DEPTH = 1024
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [DW-1:0] in_data,
  output logic          out_valid,
  input  logic          out_ready,
  output logic [DW-1:0] out_data
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [DW-1:0] mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic [AW:0]   cnt;
  logic wr, rd;

  assign in_ready  = cnt < (AW+1)'(DEPTH);
  assign out_valid = cnt != '0;
  assign wr = in_valid && in_ready;
  assign rd = out_valid && out_ready;
  assign out_data = mem[rp];

  always_ff @(posedge clk) if (wr) mem[wp] <= in_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; cnt <= '0;
    end else begin
      if (wr) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (rd) rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      cnt <= cnt + (AW+1)'(wr) - (AW+1)'(rd);
    end
  end
endmodule
