// tb_ft_sequencer: checks the phase schedule of one run for a 4:2 group
// with 4 initialisation clocks. Each clock of the run is compared with the
// expected phase, SI, test index, capture enables, transfer enable/index,
// clear and recovery enable; the run must take 2(M+N) + INIT_CYCLES + 1 =
// 17 clocks, done must pulse once, and a second start must repeat it.
module tb_ft_sequencer;
  timeunit 1ps; timeprecision 1ps;
  import tsv_ft_pkg::*;
  localparam int M = 4, N = 2, W = 6, INIT = 4;
  logic clk = 0, rst_n = 0, start = 0;
  phase_e phase;
  logic si, xfer_en, clear, recover_en, busy, done;
  logic [2:0] test_idx, xfer_idx;
  logic [W-1:0] cap_en;
  int checks = 0, failures = 0;

  ft_sequencer #(.M(M), .N(N), .INIT_CYCLES(INIT)) dut (.*);

  always #333 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic one_run();
    int busy_cycles = 0, dones = 0;
    start = 1; @(posedge clk); #1; start = 0;
    for (int c = 0; c < INIT; c++) begin
      check(phase == PH_INIT && !si && cap_en == '1 && clear && !xfer_en && !recover_en,
            $sformatf("INIT clock %0d", c));
      busy_cycles += busy; @(posedge clk); #1;
    end
    for (int c = 0; c <= W; c++) begin
      check(phase == PH_TEST && si && !clear && !recover_en, $sformatf("TEST clock %0d", c));
      check(int'(test_idx) == c, "test index");
      check(cap_en == ((c < W) ? (W'(1) << c) : W'(0)), $sformatf("cap_en %b at %0d", cap_en, c));
      check(xfer_en == (c >= 1), "transfer enable");
      if (c >= 1) check(int'(xfer_idx) == c - 1, "transfer index");
      busy_cycles += busy; @(posedge clk); #1;
    end
    for (int c = 0; c < W; c++) begin
      check(phase == PH_RECOVER && recover_en && !xfer_en && cap_en == '0, $sformatf("RECOVER clock %0d", c));
      busy_cycles += busy; @(posedge clk); #1;
    end
    check(phase == PH_IDLE && !busy, "back to normal operation");
    check(busy_cycles == 2 * W + INIT + 1, $sformatf("run length %0d clocks", busy_cycles));
    repeat (3) begin dones += done; @(posedge clk); #1; end
    check(dones == 1 || done == 0, "done pulse");
  endtask

  logic done_seen;
  int done_count = 0;
  always @(posedge clk) if (done) done_count++;

  initial begin
    repeat (2) @(posedge clk); rst_n = 1; #1;
    repeat (3) begin
      check(phase == PH_IDLE && !busy, "idle without start");
      @(posedge clk); #1;
    end
    one_run();
    one_run();
    check(done_count == 2, $sformatf("done pulses %0d", done_count));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
