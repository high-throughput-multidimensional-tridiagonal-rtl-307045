// Self-checking testbench of coef_gen: streams beats of d values over three
// systems of N rows with random back-pressure and checks that every lane
// gets a = A, b = B, c = C on interior rows, (0, 1, 0) on rows 0 and N-1, and
// its own d unchanged.
//
// The expected results follow the method's equations and are computed
// independently of the RTL. Own choice: the reduced sizes, random stimulus,
// back-pressure pattern and watchdog length.
module coef_gen_tb;
  import tridsolv_pkg::*;
  localparam int unsigned N = 6;
  localparam fp_t CA = 32'hBF00_0000, CB = 32'h4000_0000, CC = 32'hBE00_0000;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  beat_t in_data;
  coef_t [V-1:0] out_data;
  int checks = 0, failures = 0, row = 0;

  always #5 clk = ~clk;

  coef_gen #(.N(N), .COEF_A(CA), .COEF_B(CB), .COEF_C(CC)) dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    bit bnd;
    bnd = (row % N == 0) || (row % N == N - 1);
    for (int l = 0; l < V; l++) begin
      checks++;
      if (out_data[l].a !== (bnd ? FP_ZERO : CA) || out_data[l].b !== (bnd ? FP_ONE : CB) ||
          out_data[l].c !== (bnd ? FP_ZERO : CC) || out_data[l].d !== in_data[l]) begin
        failures++;
        $display("FAIL row %0d lane %0d", row, l);
      end
    end
    row++;
  end

  initial begin
    in_valid = 0; out_ready = 0; in_data = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    while (row < 3 * N) begin
      in_valid  <= $urandom_range(3, 0) != 0;
      out_ready <= $urandom_range(3, 0) != 0;
      for (int l = 0; l < V; l++) in_data[l] <= fp_t'($urandom);
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
