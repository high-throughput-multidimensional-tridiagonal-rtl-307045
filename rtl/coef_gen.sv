// Coefficient generation fused with the solver: the ADI heat iteration needs
// no stored a, b, c, only d. Each beat carries row i of V systems (one per
// lane) and this block attaches
//   a = A, b = B, c = C   on interior rows, and
//   a = 0, b = 1, c = 0   on the first and last row (Dirichlet boundary),
// counting i = 0 .. N-1 over the beats that pass. Pure pass-through timing.
//
// Follows the method: a, b, c are generated next to the solver, not stored.
// Own choice: the coefficient values, and the identity boundary rows.
module coef_gen
  import tridsolv_pkg::*;
#(
  parameter int unsigned N = 128,
  parameter fp_t COEF_A = 32'hBF00_0000,
  parameter fp_t COEF_B = 32'h4000_0000,
  parameter fp_t COEF_C = 32'hBF00_0000
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  beat_t         in_data,
  output logic          out_valid,
  input  logic          out_ready,
  output coef_t [V-1:0] out_data
);
  localparam int unsigned NW = $clog2(N);
  logic [NW-1:0] i;
  logic boundary;

  assign out_valid = in_valid;
  assign in_ready  = out_ready;
  assign boundary  = (i == '0) || (i == NW'(N - 1));

  always_comb
    for (int l = 0; l < V; l++) begin
      out_data[l].a = boundary ? FP_ZERO : COEF_A;
      out_data[l].b = boundary ? FP_ONE  : COEF_B;
      out_data[l].c = boundary ? FP_ZERO : COEF_C;
      out_data[l].d = in_data[l];
    end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) i <= '0;
    else if (in_valid && out_ready) i <= (i == NW'(N - 1)) ? '0 : i + 1'b1;
  end
endmodule
