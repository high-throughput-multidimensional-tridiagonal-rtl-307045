// Self-checking testbench of adi2d_cu: a compute unit of F_U = 3 chained ADI iterations.
// A batch of B random X x Y meshes is streamed in row-major, V points per
// beat, with random input gaps and output back-pressure in the second pass;
// every output point is compared bit-exactly with the reference model.
// The first pass streams without gaps and checks the cycle count.
//
// The expected results follow the method's equations and are computed
// independently of the RTL. Own choice: the reduced sizes, random stimulus,
// back-pressure pattern and watchdog length.
module adi2d_cu_tb;
  import tridsolv_pkg::*;
  import fp_ref_pkg::*;
  import thomas_ref_pkg::*;
  import adi_ref_pkg::*;

  localparam int unsigned X = 16, Y = 16, G = 4, B = 2;
  localparam int unsigned LF = 3, LB = 2;
  localparam fp_t LAMBDA = 32'h3E80_0000;   // 0.25
  localparam fp_t CA = 32'hBE00_0000;       // -0.125
  localparam fp_t CB = 32'h3FA0_0000;       // 1.25
  localparam fp_t CC = 32'hBE00_0000;       // -0.125
  localparam int unsigned BPM = X * Y / V;  // beats per mesh

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  beat_t in_data, out_data;
  int checks = 0, failures = 0, cycle = 0;
  bit gaps;
  fp_t u_in [B][], u_exp [B][];

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  adi2d_cu #(.F_U(3), .X(X), .Y(Y), .G(G), .LF(LF), .LB(LB), .LAMBDA(LAMBDA), .COEF_A(CA), .COEF_B(CB), .COEF_C(CC)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_data, .out_valid, .out_ready, .out_data);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic make_batch();
    for (int b = 0; b < B; b++) begin
      u_in[b] = new[X * Y];
      foreach (u_in[b][k]) u_in[b][k] = from_real(real'($urandom_range(2000, 0)) / 1000.0 - 1.0);
      u_exp[b] = u_in[b];
      repeat (3) step(X, Y, LAMBDA, CA, CB, CC, u_exp[b]);
    end
  endtask

  task automatic drive();
    for (int b = 0; b < B; b++)
      for (int t = 0; t < BPM; t++) begin
        in_valid <= 1'b1;
        for (int p = 0; p < V; p++) in_data[p] <= u_in[b][t*V+p];
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        if (gaps && $urandom_range(3, 0) == 0) begin
          in_valid <= 1'b0;
          repeat ($urandom_range(3, 1)) @(posedge clk);
        end
      end
    in_valid <= 1'b0;
  endtask

  task automatic collect(output int last);
    for (int b = 0; b < B; b++)
      for (int t = 0; t < BPM; t++) begin
        out_ready <= gaps ? ($urandom_range(2, 0) != 0) : 1'b1;
        @(posedge clk);
        while (!(out_valid && out_ready)) begin
          out_ready <= gaps ? ($urandom_range(2, 0) != 0) : 1'b1;
          @(posedge clk);
        end
        for (int p = 0; p < V; p++) begin
          checks++;
          if (out_data[p] !== u_exp[b][t*V+p]) begin
            failures++;
            if (failures < 10) $display("FAIL mesh %0d point %0d got %h exp %h",
                                        b, t*V+p, out_data[p], u_exp[b][t*V+p]);
          end
        end
      end
    out_ready <= 1'b0;
    last = cycle;
  endtask

  initial begin
    int t0, t1;
    in_valid = 0; out_ready = 0; in_data = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int pass = 0; pass < 2; pass++) begin
      gaps = (pass == 1);
      make_batch();
      @(posedge clk);
      t0 = cycle;
      fork
        drive();
        collect(t1);
      join
      if (!gaps) begin
        checks++;
        $display("adi2d_cu: batch of %0d meshes took %0d cycles, bound %0d", B, t1 - t0, B * BPM + 3 * (2 * X / V + 4 * X + 6 * G * (X + Y) + 4 * BPM + 200));
        if (t1 - t0 > B * BPM + 3 * (2 * X / V + 4 * X + 6 * G * (X + Y) + 4 * BPM + 200)) begin
          failures++;
          $display("FAIL cycle count above bound");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
