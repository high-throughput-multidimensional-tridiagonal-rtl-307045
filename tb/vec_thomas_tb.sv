// Self-checking testbench of vec_thomas: each of the V lanes receives its
// own random diagonally dominant systems (different in every lane), and the
// lane outputs are compared bit-exactly with the reference Thomas algorithm.
// A continuous pass checks the batched cycle count, a second pass applies
// random input gaps and output back-pressure.
//
// The expected results follow the method's equations and are computed
// independently of the RTL. Own choice: the reduced sizes, random stimulus,
// back-pressure pattern and watchdog length.
module vec_thomas_tb;
  import tridsolv_pkg::*;
  import fp_ref_pkg::*;
  import thomas_ref_pkg::*;

  localparam int unsigned G = 4, N = 6, LF = 3, LB = 2;
  localparam int unsigned B = 2 * G;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  coef_t [V-1:0] in_data;
  beat_t out_data;
  int checks = 0, failures = 0, cycle = 0;
  bit gaps;
  coef_t rows [V][B][];
  fp_t   exp_u [V][B][];

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  vec_thomas #(.G(G), .N(N), .LF(LF), .LB(LB)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic make_batch();
    for (int l = 0; l < V; l++)
      for (int s = 0; s < B; s++) begin
        rows[l][s] = new[N];
        foreach (rows[l][s][i]) rows[l][s][i] = rand_row();
        thomas_ref(rows[l][s], exp_u[l][s]);
      end
  endtask

  task automatic drive();
    for (int s = 0; s < B; s++)
      for (int i = 0; i < N; i++) begin
        in_valid <= 1'b1;
        for (int l = 0; l < V; l++) in_data[l] <= rows[l][s][i];
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
    for (int s = 0; s < B; s++)
      for (int i = 0; i < N; i++) begin
        out_ready <= gaps ? ($urandom_range(2, 0) != 0) : 1'b1;
        @(posedge clk);
        while (!(out_valid && out_ready)) begin
          out_ready <= gaps ? ($urandom_range(2, 0) != 0) : 1'b1;
          @(posedge clk);
        end
        for (int l = 0; l < V; l++) begin
          checks++;
          if (out_data[l] !== exp_u[l][s][i]) begin
            failures++;
            if (failures < 10) $display("FAIL lane %0d sys %0d row %0d got %h exp %h",
                                        l, s, i, out_data[l], exp_u[l][s][i]);
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
        if (t1 - t0 > (3 + B / G) * G * N + LF + LB + 12) begin
          failures++;
          $display("FAIL batch took %0d cycles, model %0d", t1 - t0, (3 + B / G) * G * N);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
