// End-to-end testbench of adi2d_top at reduced size (2 compute units of
// 3 unrolled iterations, 16x16 meshes, groups of G = 4 systems).
// Every compute unit gets its own batch of B random meshes; each unit's
// output must equal F_U reference ADI iterations of its input, bit for bit.
// Random input gaps and output back-pressure are applied on the second pass.
// The testbench also counts how often the mechanisms of the design occur and
// fails if one never does: input stalls, output back-pressure, ping-pong bank
// hand-overs, forward and backward Thomas stages running at once on two
// groups, the stencil's boundary-row flush, and the delay FIFO holding u.
//
// The expected results follow the method's equations and are computed
// independently of the RTL. Own choice: the reduced sizes, random stimulus,
// back-pressure pattern and watchdog length.
module adi2d_top_tb;
  import tridsolv_pkg::*;
  import fp_ref_pkg::*;
  import thomas_ref_pkg::*;
  import adi_ref_pkg::*;

  localparam int unsigned N_CU = 2, F_U = 1, X = 16, Y = 16, G = 4;
  localparam int unsigned B = 2 * V * G / ((X < Y ? X : Y));   // meshes per unit, fills whole groups
  localparam int unsigned BPM = X * Y / V;
  localparam int unsigned PASSES = 2;
  localparam fp_t LAMBDA = 32'h3F80_0000;   // the top's default coefficients
  localparam fp_t CA = 32'hBF00_0000;
  localparam fp_t CB = 32'h4000_0000;
  localparam fp_t CC = 32'hBF00_0000;

  logic clk = 0, rst_n = 0;
  logic [N_CU-1:0] in_valid, in_ready, out_valid, out_ready;
  beat_t [N_CU-1:0] in_data, out_data;
  int checks = 0, failures = 0, cycle = 0;
  bit gaps;
  fp_t u_in [N_CU][B][], u_exp [N_CU][B][];
  int n_in_stall = 0, n_out_bp = 0, n_swap = 0, n_overlap = 0, n_flush = 0, n_fifo = 0;
  int n_done = 0, pass_start = -1;

  // one driver and one collector per compute unit, started for each pass
  for (genvar c = 0; c < N_CU; c++) begin : g_port
    initial begin
      for (int pass = 0; pass < PASSES; pass++) begin
        while (pass_start < pass) @(posedge clk);
        fork
          drive(c);
          collect(c);
        join
        n_done++;
      end
    end
  end

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  adi2d_top #(.N_CU(N_CU), .F_U(F_U), .X(X), .Y(Y), .G(G), .LF(3), .LB(2)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_data, .out_valid, .out_ready, .out_data);

  // mechanism counters, observed in compute unit 0, first iteration
  always @(posedge clk) if (rst_n) begin
    if (in_valid[0] && !in_ready[0]) n_in_stall++;
    if (out_valid[0] && !out_ready[0]) n_out_bp++;
    if (dut.g_cu[0].u_cu.g_iter[0].u_stage.u_xs.u_vt.g_lane[0].u_solver.u_fw.in_rd_release) n_swap++;
    if (dut.g_cu[0].u_cu.g_iter[0].u_stage.u_xs.u_vt.g_lane[0].u_solver.u_fw.in_rd_en &&
        dut.g_cu[0].u_cu.g_iter[0].u_stage.u_xs.u_vt.g_lane[0].u_solver.u_bw.in_rd_en) n_overlap++;
    if (dut.g_cu[0].u_cu.g_iter[0].u_stage.u_rhs.flush) n_flush++;
    if (dut.g_cu[0].u_cu.g_iter[0].u_stage.u_delay.cnt > 1) n_fifo++;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic make_batch();
    for (int c = 0; c < N_CU; c++)
      for (int b = 0; b < B; b++) begin
        u_in[c][b] = new[X * Y];
        foreach (u_in[c][b][k]) u_in[c][b][k] = from_real(real'($urandom_range(2000, 0)) / 1000.0 - 1.0);
        u_exp[c][b] = u_in[c][b];
        repeat (F_U) step(X, Y, LAMBDA, CA, CB, CC, u_exp[c][b]);
      end
  endtask

  task automatic drive(int c);
    for (int b = 0; b < B; b++)
      for (int t = 0; t < BPM; t++) begin
        in_valid[c] <= 1'b1;
        for (int p = 0; p < V; p++) in_data[c][p] <= u_in[c][b][t*V+p];
        @(posedge clk);
        while (!in_ready[c]) @(posedge clk);
        if (gaps && $urandom_range(3, 0) == 0) begin
          in_valid[c] <= 1'b0;
          repeat ($urandom_range(3, 1)) @(posedge clk);
        end
      end
    in_valid[c] <= 1'b0;
  endtask

  task automatic collect(int c);
    for (int b = 0; b < B; b++)
      for (int t = 0; t < BPM; t++) begin
        out_ready[c] <= gaps ? ($urandom_range(2, 0) != 0) : 1'b1;
        @(posedge clk);
        while (!(out_valid[c] && out_ready[c])) begin
          out_ready[c] <= gaps ? ($urandom_range(2, 0) != 0) : 1'b1;
          @(posedge clk);
        end
        for (int p = 0; p < V; p++) begin
          checks++;
          if (out_data[c][p] !== u_exp[c][b][t*V+p]) begin
            failures++;
            if (failures < 10) $display("FAIL unit %0d mesh %0d point %0d got %h exp %h",
                                        c, b, t*V+p, out_data[c][p], u_exp[c][b][t*V+p]);
          end
        end
      end
    out_ready[c] <= 1'b0;
  endtask

  task automatic mech(string name, int n);
    checks++;
    $display("  %-38s %0d", name, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", name);
    end
  endtask

  initial begin
    int t0;
    in_valid = '0; out_ready = '0; in_data = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int pass = 0; pass < PASSES; pass++) begin
      gaps = (pass == 1);
      make_batch();
      @(posedge clk);
      t0 = cycle;
      n_done = 0;
      pass_start = pass;
      while (n_done < N_CU) @(posedge clk);
      $display("pass %0d: %0d units x %0d meshes of %0dx%0d, %0d iterations each, %0d cycles",
               pass, N_CU, B, X, Y, F_U, cycle - t0);
      if (!gaps) begin
        // pipeline fill of F_U iterations plus one beat per cycle afterwards
        checks++;
        if (cycle - t0 > B * BPM + F_U * (2 * X / V + 4 * X + 6 * G * (X + Y) + 4 * BPM + 200)) begin
          failures++;
          $display("FAIL cycle count above bound");
        end
      end
    end
    $display("mechanisms seen in unit 0:");
    mech("input stall (in_valid, !in_ready)", n_in_stall);
    if (PASSES > 1) mech("output back-pressure", n_out_bp);
    mech("ping-pong hand-over (forward stage)", n_swap);
    mech("forward and backward run together", n_overlap);
    mech("stencil boundary-row flush", n_flush);
    mech("delay FIFO holding u", n_fifo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
