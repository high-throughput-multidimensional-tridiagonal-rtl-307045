// Self-checking testbench of thomas_forward: groups of random diagonally
// dominant systems are loaded through a thomas_interleave stage; after the
// forward stage commits a bank, the testbench reads c* and d* of every row
// through the read port and compares them bit-exactly with the forward sweep
// of the reference algorithm. The time from the input bank becoming full to
// the output bank being committed must be G*N cycles plus the pipeline
// latency LF, the interleaved forward pass issuing one row per cycle.
//
// The expected results follow the method's equations and are computed
// independently of the RTL. Own choice: the reduced sizes, random stimulus,
// back-pressure pattern and watchdog length.
module thomas_forward_tb;
  import tridsolv_pkg::*;
  import fp_ref_pkg::*;
  import thomas_ref_pkg::*;
  localparam int unsigned G = 4, N = 5, LF = 3, AW = $clog2(G * N), NG = 3;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready;
  coef_t in_data;
  logic [1:0] in_full, full;
  logic in_rd_en, in_rd_bank, in_rd_release;
  logic [AW-1:0] in_rd_addr;
  coef_t in_rd_data;
  logic rd_en, rd_bank, rd_release;
  logic [AW-1:0] rd_addr;
  cd_t rd_data;
  int checks = 0, failures = 0, cycle = 0;
  coef_t rows [NG][G][];
  fp_t cs [NG][G][N], ds [NG][G][N];

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  thomas_interleave #(.G(G), .N(N)) u_src (
    .clk, .rst_n, .in_valid, .in_ready, .in_data,
    .rd_en(in_rd_en), .rd_bank(in_rd_bank), .rd_addr(in_rd_addr), .rd_data(in_rd_data),
    .rd_release(in_rd_release), .full(in_full));
  thomas_forward #(.G(G), .N(N), .LF(LF)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fp_t r, a;
    for (int g = 0; g < NG; g++)
      for (int s = 0; s < G; s++) begin
        rows[g][s] = new[N];
        for (int i = 0; i < N; i++) begin
          rows[g][s][i] = rand_row();
          a = (i == 0) ? FP_ZERO : rows[g][s][i].a;
          r = r_div(FP_ONE, r_sub(rows[g][s][i].b, r_mul(a, (i == 0) ? FP_ZERO : cs[g][s][i-1])));
          ds[g][s][i] = r_mul(r, r_sub(rows[g][s][i].d, r_mul(a, (i == 0) ? FP_ZERO : ds[g][s][i-1])));
          cs[g][s][i] = r_mul(r, rows[g][s][i].c);
        end
      end
    in_valid = 0; in_data = '0; rd_en = 0; rd_bank = 0; rd_addr = '0; rd_release = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    fork
      begin
        for (int g = 0; g < NG; g++)
          for (int s = 0; s < G; s++)
            for (int i = 0; i < N; i++) begin
              in_valid <= 1'b1;
              in_data  <= rows[g][s][i];
              @(posedge clk);
              while (!in_ready) @(posedge clk);
            end
        in_valid <= 1'b0;
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
            if (cycle - t0 > G * N + LF + 3) begin
              failures++;
              $display("FAIL forward pass too slow");
            end
          end
          for (int i = 0; i < N; i++)
            for (int s = 0; s < G; s++) begin
              rd_en <= 1'b1;
              rd_bank <= 1'(g % 2);
              rd_addr <= AW'(s * N + i);
              rd_release <= (i == N - 1) && (s == G - 1);
              @(posedge clk);
              #1;
              checks++;
              if (rd_data.c !== cs[g][s][i] || rd_data.d !== ds[g][s][i]) begin
                failures++;
                if (failures < 10) $display("FAIL group %0d sys %0d row %0d got %h %h exp %h %h", g, s, i,
                                            rd_data.c, rd_data.d, cs[g][s][i], ds[g][s][i]);
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
