// tb_recovery_control: checks signal line counter, faulty TSV accumulator
// and comparator of a 4:2 group.
// First the status stream 0,1,0,1,0,0 (TSV2 and TSV4 faulty) is applied one
// bit per clock and, for each clock, the enable and accumulator output are
// checked against the printed per-cycle table, and the line count after the
// clock edge (1,1,2,2,3,4). Then random 6-bit streams are compared with a
// counting model, including the exceed flag for more than two faults.
module tb_recovery_control;
  timeunit 1ps; timeprecision 1ps;
  localparam int M = 4, N = 2, K = 2, W = 6;
  logic clk = 0, rst_n = 0, clear = 0, en = 0, status_bit = 0;
  logic [2:0] tol_limit = 3'd2;
  logic latch_en, lines_done, exceed;
  logic [K-1:0] acc_out;
  logic [2:0] line_count;
  logic [2:0] faulty_count;
  int checks = 0, failures = 0;

  recovery_control #(.M(M), .N(N)) dut (.*);

  always #333 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic       ex_bit [6] = '{0, 1, 0, 1, 0, 0};
  logic       ex_en  [6] = '{1, 0, 1, 0, 1, 1};
  logic [1:0] ex_acc [6] = '{2'b00, 2'b01, 2'b01, 2'b10, 2'b10, 2'b10};
  int         ex_cnt [6] = '{1, 1, 2, 2, 3, 4};

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    clear = 1; @(posedge clk); #1; clear = 0;
    for (int c = 0; c < W; c++) begin
      en = 1; status_bit = ex_bit[c]; #1;
      check(latch_en == ex_en[c], $sformatf("cycle %0d enable %b", c + 1, latch_en));
      check(acc_out == ex_acc[c], $sformatf("cycle %0d acc %b", c + 1, acc_out));
      @(posedge clk); #1;
      check(int'(line_count) == ex_cnt[c], $sformatf("cycle %0d count %0d", c + 1, line_count));
    end
    en = 0;
    check(lines_done && !exceed, "example complete, no exceed");
    for (int k = 0; k < 100; k++) begin
      automatic logic [W-1:0] w = W'($urandom);
      automatic int ones = 0, zeros = 0;
      clear = 1; @(posedge clk); #1; clear = 0;
      for (int j = W - 1; j >= 0; j--) begin
        en = 1; status_bit = w[j]; #1;
        check(latch_en == (!w[j] && zeros < M), "random enable");
        check(int'(acc_out) == ((ones + w[j]) % 4), "random acc");
        ones += w[j];
        if (!w[j] && zeros < M) zeros++;
        @(posedge clk); #1;
      end
      en = 0;
      check(int'(faulty_count) == ones, "random faulty count");
      check(int'(line_count) == zeros, "random line count");
      check(exceed == (ones > N), $sformatf("exceed for %b", w));
      check(lines_done == (ones <= N), "lines done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
