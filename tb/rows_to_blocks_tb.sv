// Self-checking testbench of rows_to_blocks: V x-lines in, VxV blocks out.
// Every input point carries its own serial number, so the expected output
// order can be computed independently: output beat o of
// a bank is input beat (o % V) * X/V + o / V.
// Three banks' worth of data pass, first as a continuous stream (checking
// one beat per cycle after the fill latency) and then with random input gaps
// and output back-pressure.
//
// The expected results follow the method's equations and are computed
// independently of the RTL. Own choice: the reduced sizes, random stimulus,
// back-pressure pattern and watchdog length.
module rows_to_blocks_tb;
  import tridsolv_pkg::*;

  localparam int unsigned X = 32, Y = 8;
  localparam int unsigned BPL = X / V;
  localparam int unsigned CNT = V * BPL;        // beats per block/bank
  localparam int unsigned NB = 3;             // blocks sent per pass

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  beat_t in_data, out_data;
  int checks = 0, failures = 0, cycle = 0;
  bit gaps;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  rows_to_blocks #(.X(X)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_data, .out_valid, .out_ready, .out_data);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // input beat t (within its block) for output beat o (within its block)
  function automatic int src(int o);
    return (o % V) * BPL + o / V;
  endfunction

  task automatic drive(int base);
    for (int t = 0; t < NB * CNT; t++) begin
      in_valid <= 1'b1;
      for (int p = 0; p < V; p++) in_data[p] <= fp_t'(base + t * V + p);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      if (gaps && $urandom_range(3, 0) == 0) begin
        in_valid <= 1'b0;
        repeat ($urandom_range(3, 1)) @(posedge clk);
      end
    end
    in_valid <= 1'b0;
  endtask

  task automatic collect(int base, output int first, output int last);
    for (int o = 0; o < NB * CNT; o++) begin
      out_ready <= gaps ? ($urandom_range(2, 0) != 0) : 1'b1;
      @(posedge clk);
      while (!(out_valid && out_ready)) begin
        out_ready <= gaps ? ($urandom_range(2, 0) != 0) : 1'b1;
        @(posedge clk);
      end
      if (o == 0) first = cycle;
      for (int p = 0; p < V; p++) begin
        fp_t e;
        e = fp_t'(base + ((o / CNT) * CNT + src(o % CNT)) * V + p);
        checks++;
        if (out_data[p] !== e) begin
          failures++;
          if (failures < 10) $display("FAIL beat %0d lane %0d got %0d exp %0d", o, p, out_data[p], e);
        end
      end
    end
    out_ready <= 1'b0;
    last = cycle;
  endtask

  initial begin
    int f, l;
    in_valid = 0; out_ready = 0; in_data = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int pass = 0; pass < 2; pass++) begin
      gaps = (pass == 1);
      @(posedge clk);
      fork
        drive(pass * 100000);
        collect(pass * 100000, f, l);
      join
      if (!gaps) begin
        checks++;
        if (l - f > NB * CNT + 2) begin
          failures++;
          $display("FAIL output took %0d cycles for %0d beats", l - f, NB * CNT);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
