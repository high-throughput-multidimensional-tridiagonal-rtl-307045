// Self-checking testbench of thomas_interleave: three groups of G systems of
// N rows are streamed in system after system; the testbench reads each full
// bank back through the read port in interleaved order (row i of systems
// 0..G-1, then row i+1) and compares the coefficients. It also checks that
// the input stalls while both banks are full and that the first read waits
// for the first complete group.
//
// The expected results follow the method's equations and are computed
// independently of the RTL. Own choice: the reduced sizes, random stimulus,
// back-pressure pattern and watchdog length.
module thomas_interleave_tb;
  import tridsolv_pkg::*;
  localparam int unsigned G = 3, N = 5, AW = $clog2(G * N), NG = 3;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready;
  coef_t in_data;
  logic rd_en, rd_bank, rd_release;
  logic [AW-1:0] rd_addr;
  coef_t rd_data;
  logic [1:0] full;
  int checks = 0, failures = 0, stalls = 0;

  always #5 clk = ~clk;

  thomas_interleave #(.G(G), .N(N)) dut (.*);

  function automatic coef_t row(int grp, int s, int i);
    coef_t c;
    c.a = fp_t'(grp * 1000 + s * 100 + i);
    c.b = fp_t'(~(grp * 1000 + s * 100 + i));
    c.c = fp_t'(32'h1234_0000 + grp * 1000 + s * 100 + i);
    c.d = fp_t'($urandom);
    return c;
  endfunction

  coef_t sent [NG][G][N];

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (in_valid && !in_ready) stalls++;

  initial begin
    in_valid = 0; in_data = '0; rd_en = 0; rd_bank = 0; rd_addr = '0; rd_release = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    // all three groups: the third must stall until the first bank is read
    fork
      begin
        for (int g = 0; g < NG; g++)
          for (int s = 0; s < G; s++)
            for (int i = 0; i < N; i++) begin
              sent[g][s][i] = row(g, s, i);
              in_valid <= 1'b1;
              in_data  <= sent[g][s][i];
              @(posedge clk);
              while (!in_ready) @(posedge clk);
            end
        in_valid <= 1'b0;
      end
      begin
        for (int g = 0; g < NG; g++) begin
          // wait for the bank, then a few more cycles so the writer fills the other one
          while (!full[g % 2]) @(posedge clk);
          if (g == 0) begin
            checks++;
            if (full !== 2'b01) begin failures++; $display("FAIL first bank flag %b", full); end
            repeat (G * N + 10) @(posedge clk);
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
              if (rd_data !== sent[g][s][i]) begin
                failures++;
                $display("FAIL group %0d sys %0d row %0d", g, s, i);
              end
            end
          rd_en <= 1'b0;
          rd_release <= 1'b0;
          @(posedge clk);
        end
      end
    join
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL input never stalled on full banks"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
