// Self-checking testbench of delay_fifo: random pushes and pops compared with
// a queue model, including filling the FIFO to DEPTH (in_ready must drop) and
// draining it (out_valid must drop).
//
// The expected results follow the method's equations and are computed
// independently of the RTL. Own choice: the reduced sizes, random stimulus,
// back-pressure pattern and watchdog length.
module delay_fifo_tb;
  localparam int unsigned DW = 16, DEPTH = 12;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [DW-1:0] in_data, out_data;
  int checks = 0, failures = 0;
  logic [DW-1:0] q [$];
  int phase;

  always #5 clk = ~clk;

  delay_fifo #(.DW(DW), .DEPTH(DEPTH)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    checks++;
    if (in_ready !== (q.size() < DEPTH) || out_valid !== (q.size() > 0)) begin
      failures++;
      $display("FAIL flags: size %0d in_ready %b out_valid %b", q.size(), in_ready, out_valid);
    end
    if (out_valid && out_ready) begin
      checks++;
      if (out_data !== q[0]) begin
        failures++;
        $display("FAIL data got %h exp %h", out_data, q[0]);
      end
      void'(q.pop_front());
    end
    if (in_valid && in_ready) q.push_back(in_data);
    // next stimulus: fill, then random, then drain
    in_valid  <= (phase != 2) && ($urandom_range(3, 0) != 0);
    out_ready <= (phase == 0) ? 1'b0 : (phase == 2) ? 1'b1 : ($urandom_range(1, 0) == 1);
    in_data   <= DW'($urandom);
  end

  initial begin
    in_valid = 0; out_ready = 0; in_data = '0; phase = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (40) @(posedge clk);     // fill past DEPTH
    phase = 1;
    repeat (2000) @(posedge clk);
    phase = 2;
    repeat (40) @(posedge clk);     // drain
    checks++;
    if (q.size() != 0 || out_valid) begin
      failures++;
      $display("FAIL not drained");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
