// Self-checking testbench of thomas_solver: a batch of random diagonally
// dominant systems is streamed in, the solutions are compared bit-exactly
// with the reference Thomas algorithm, first with a continuous stream (to
// check the (3 + B/G) * G*N cycle count of the batched solver) and then with
// random input gaps and output back-pressure.
//
// The expected results follow the method's equations and are computed
// independently of the RTL. Own choice: the reduced sizes, random stimulus,
// back-pressure pattern and watchdog length.
module thomas_solver_tb;
  import tridsolv_pkg::*;
  import fp_ref_pkg::*;
  import thomas_ref_pkg::*;

  localparam int unsigned G = 4, N = 8, LF = 3, LB = 2;
  localparam int unsigned B = 3 * G;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  coef_t in_data;
  fp_t out_data;
  int checks = 0, failures = 0;
  int cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  thomas_solver #(.G(G), .N(N), .LF(LF), .LB(LB)) dut (.*);

  coef_t rows [B][];
  fp_t   exp_u [B][];
  bit    gaps;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic make_batch();
    for (int s = 0; s < B; s++) begin
      rows[s] = new[N];
      foreach (rows[s][i]) rows[s][i] = rand_row();
      thomas_ref(rows[s], exp_u[s]);
    end
  endtask

  task automatic drive();
    for (int s = 0; s < B; s++)
      for (int i = 0; i < N; i++) begin
        in_valid <= 1'b1;
        in_data  <= rows[s][i];
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        if (gaps && $urandom_range(3, 0) == 0) begin
          in_valid <= 1'b0;
          repeat ($urandom_range(3, 1)) @(posedge clk);
        end
      end
    in_valid <= 1'b0;
  endtask

  task automatic collect(output int last_cycle);
    for (int s = 0; s < B; s++)
      for (int i = 0; i < N; i++) begin
        out_ready <= gaps ? ($urandom_range(2, 0) != 0) : 1'b1;
        @(posedge clk);
        while (!(out_valid && out_ready)) begin
          out_ready <= gaps ? ($urandom_range(2, 0) != 0) : 1'b1;
          @(posedge clk);
        end
        checks++;
        if (out_data !== exp_u[s][i]) begin
          failures++;
          if (failures < 10) $display("FAIL sys %0d row %0d got %h exp %h", s, i, out_data, exp_u[s][i]);
        end
      end
    out_ready <= 1'b0;
    last_cycle = cycle;
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
        // Batched latency model: (3 + B/G) * G*N cycles plus pipeline fill.
        checks++;
        if (t1 - t0 > (3 + B / G) * G * N + LF + LB + 12) begin
          failures++;
          $display("FAIL batch took %0d cycles, model %0d", t1 - t0, (3 + B / G) * G * N);
        end else $display("batch of %0d systems took %0d cycles (model %0d)", B, t1 - t0, (3 + B / G) * G * N);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
