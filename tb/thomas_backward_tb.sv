// Self-checking testbench of thomas_backward: the testbench fills a
// ping-pong buffer with random forward results (c*, d*) of G systems, the
// backward stage substitutes in reverse row order, and u of every row is read
// through the read port and compared bit-exactly with
// u_{N-1} = d*_{N-1}, u_i = d*_i - c*_i u_{i+1}. The backward pass of a group
// must take G*N cycles plus its latency LB.
//
// The expected results follow the method's equations and are computed
// independently of the RTL. Own choice: the reduced sizes, random stimulus,
// back-pressure pattern and watchdog length.
module thomas_backward_tb;
  import tridsolv_pkg::*;
  import fp_ref_pkg::*;
  localparam int unsigned G = 4, N = 5, LB = 2, AW = $clog2(G * N), NG = 3;

  logic clk = 0, rst_n = 0;
  logic [1:0] in_full, full;
  logic in_rd_en, in_rd_bank, in_rd_release;
  logic [AW-1:0] in_rd_addr;
  cd_t in_rd_data;
  logic rd_en, rd_bank, rd_release;
  logic [AW-1:0] rd_addr;
  fp_t rd_data;
  logic src_we, src_wb, src_commit;
  logic [AW-1:0] src_wa;
  cd_t src_wd;
  int checks = 0, failures = 0, cycle = 0;
  cd_t cd [NG][G][N];
  fp_t u [NG][G][N];

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  pingpong_buffer #(.DW($bits(cd_t)), .DEPTH(G * N)) u_src (
    .clk, .rst_n, .wr_en(src_we), .wr_bank(src_wb), .wr_addr(src_wa), .wr_data(src_wd),
    .wr_commit(src_commit), .rd_en(in_rd_en), .rd_bank(in_rd_bank), .rd_addr(in_rd_addr),
    .rd_data(in_rd_data), .rd_release(in_rd_release), .full(in_full));
  thomas_backward #(.G(G), .N(N), .LB(LB)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int g = 0; g < NG; g++)
      for (int s = 0; s < G; s++) begin
        for (int i = 0; i < N; i++) begin
          cd[g][s][i].c = from_real(real'($urandom_range(1000, 0)) / 1000.0 - 0.5);
          cd[g][s][i].d = from_real(real'($urandom_range(2000, 0)) / 100.0 - 10.0);
        end
        u[g][s][N-1] = cd[g][s][N-1].d;
        for (int i = N - 2; i >= 0; i--) u[g][s][i] = r_sub(cd[g][s][i].d, r_mul(cd[g][s][i].c, u[g][s][i+1]));
      end
    src_we = 0; src_wb = 0; src_commit = 0; src_wa = '0; src_wd = '0;
    rd_en = 0; rd_bank = 0; rd_addr = '0; rd_release = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    fork
      for (int g = 0; g < NG; g++) begin
        while (in_full[g % 2]) @(posedge clk);
        for (int k = 0; k < G * N; k++) begin
          src_we <= 1'b1;
          src_wb <= 1'(g % 2);
          src_wa <= AW'(k);
          src_wd <= cd[g][k / N][k % N];
          src_commit <= (k == G * N - 1);
          @(posedge clk);
        end
        src_we <= 1'b0;
        src_commit <= 1'b0;
        @(posedge clk);
      end
      begin
        int t0;
        for (int g = 0; g < NG; g++) begin
          if (g == 0) begin
            while (!in_full[0]) @(posedge clk);
            t0 = cycle;
          end
          while (!full[g % 2]) @(posedge clk);
          if (g == 0) begin
            checks++;
            $display("first group: %0d cycles from input bank full to result bank full", cycle - t0);
            if (cycle - t0 > G * N + LB + 3) begin
              failures++;
              $display("FAIL backward pass too slow");
            end
          end
          for (int s = 0; s < G; s++)
            for (int i = 0; i < N; i++) begin
              rd_en <= 1'b1;
              rd_bank <= 1'(g % 2);
              rd_addr <= AW'(s * N + i);
              rd_release <= (i == N - 1) && (s == G - 1);
              @(posedge clk);
              #1;
              checks++;
              if (rd_data !== u[g][s][i]) begin
                failures++;
                if (failures < 10) $display("FAIL group %0d sys %0d row %0d got %h exp %h", g, s, i, rd_data, u[g][s][i]);
              end
            end
          rd_en <= 1'b0;
          rd_release <= 1'b0;
          @(posedge clk);
        end
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
