// Self-checking testbench of pingpong_buffer: several rounds in which one
// bank is written with random words while the other is read back in a
// scrambled order, checking the data and the full flags after every commit
// and release. DEPTH is not a power of two on purpose.
//
// The expected results follow the method's equations and are computed
// independently of the RTL. Own choice: the reduced sizes, random stimulus,
// back-pressure pattern and watchdog length.
module pingpong_buffer_tb;
  localparam int unsigned DW = 16, DEPTH = 5, AW = $clog2(DEPTH);
  logic clk = 0, rst_n = 0;
  logic wr_en, wr_bank, wr_commit, rd_en, rd_bank, rd_release;
  logic [AW-1:0] wr_addr, rd_addr;
  logic [DW-1:0] wr_data, rd_data;
  logic [1:0] full;
  logic [DW-1:0] model [2][DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pingpong_buffer #(.DW(DW), .DEPTH(DEPTH)) dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_full(logic [1:0] e);
    checks++;
    if (full !== e) begin
      failures++;
      $display("FAIL full %b exp %b", full, e);
    end
  endtask

  initial begin
    wr_en = 0; wr_bank = 0; wr_commit = 0; rd_en = 0; rd_bank = 0; rd_release = 0;
    wr_addr = '0; rd_addr = '0; wr_data = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    check_full(2'b00);
    for (int round = 0; round <= 6; round++) begin
      // write bank (round % 2) while reading bank ((round + 1) % 2)
      for (int k = 0; k < DEPTH; k++) begin
        wr_en <= (round < 6);
        rd_en <= (round > 0);
        if (round < 6) begin
          wr_bank <= 1'(round % 2);
          wr_addr <= AW'(k);
          wr_data <= DW'($urandom);
          wr_commit <= (k == DEPTH - 1);
        end
        if (round > 0) begin
          rd_bank <= 1'((round + 1) % 2);
          rd_addr <= AW'((k * 2) % DEPTH);
          rd_release <= (k == DEPTH - 1);
        end
        @(posedge clk);
        if (wr_en) model[wr_bank][wr_addr] = wr_data;
        if (rd_en) begin
          #1;
          checks++;
          if (rd_data !== model[rd_bank][rd_addr]) begin
            failures++;
            $display("FAIL round %0d addr %0d got %h exp %h", round, rd_addr, rd_data, model[rd_bank][rd_addr]);
          end
        end
      end
      wr_en <= 0; wr_commit <= 0; rd_en <= 0; rd_release <= 0;
      @(posedge clk);
      if (round < 6) check_full(round % 2 == 0 ? 2'b01 : 2'b10);
      else check_full(2'b00);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
