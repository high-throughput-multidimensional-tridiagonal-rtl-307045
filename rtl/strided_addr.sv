// Address counter for a transposed walk through a buffer of INNER x OUTER
// words stored row by row with row length STRIDE: each step moves to the
// next inner index, and after INNER steps to the next outer index, giving
// addr = inner * STRIDE + outer. It wraps to zero after INNER*OUTER steps.
//
// Own helper: the address generator used by the reordering buffers.
module strided_addr #(
  parameter int unsigned INNER  = 8,
  parameter int unsigned OUTER  = 16,
  parameter int unsigned STRIDE = 16,
  parameter int unsigned AW     = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          step,
  output logic [AW-1:0] addr
);
  localparam int unsigned IW = (INNER > 1) ? $clog2(INNER) : 1;
  localparam int unsigned OW = (OUTER > 1) ? $clog2(OUTER) : 1;
  logic [IW-1:0] inner;
  logic [OW-1:0] outer;

  assign addr = AW'(32'(inner) * STRIDE + 32'(outer));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      inner <= '0;
      outer <= '0;
    end else if (step) begin
      if (inner == IW'(INNER - 1)) begin
        inner <= '0;
        outer <= (outer == OW'(OUTER - 1)) ? '0 : outer + 1'b1;
      end else inner <= inner + 1'b1;
    end
  end
endmodule
