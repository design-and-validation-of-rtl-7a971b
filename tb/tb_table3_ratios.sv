// tb_table3_ratios: the grouping ratios of the area/repair trade-off study,
// run on the RTL. For each of the twelve ratios (1:1 .. 120:6) a 1000-line
// bus is built as ceil(1000/M) groups of that ratio and three such buses are
// tried, with every TSV defective with probability 1 %. Each group is tested
// and repaired by one tsv_ft_group instance of that ratio, trial after trial
// (see ratio_lane). The testbench checks the detection, exceed flag, selects
// and traffic of every trial and prints, per ratio, the number of defects,
// the groups that could not be repaired and the buses fully repaired.
module tb_table3_ratios;
  timeunit 1ps; timeprecision 1ps;
  localparam int NR = 12;
  localparam int RM [NR] = '{1, 2, 3, 2, 4, 6, 12, 16, 40, 50, 100, 120};
  localparam int RN [NR] = '{1, 2, 3, 1, 2, 3, 3, 4, 4, 5, 5, 6};
  logic clk = 0, rst_n = 0;
  logic [NR-1:0] fin;
  int chk [NR], fail [NR], gfail [NR], brep [NR], nfi [NR];
  int checks = 0, failures = 0;

  always #333 clk = ~clk;

  for (genvar r = 0; r < NR; r++) begin : g_ratio
    ratio_lane #(.M(RM[r]), .N(RN[r]), .GROUPS((1000 + RM[r] - 1) / RM[r]), .BUSES(3), .RATE_PPM(10000)) u_lane (
      .clk(clk), .rst_n(rst_n), .finished(fin[r]), .checks(chk[r]), .failures(fail[r]),
      .groups_failed(gfail[r]), .buses_repaired(brep[r]), .faults_injected(nfi[r]));
  end

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    wait (&fin);
    for (int r = 0; r < NR; r++) begin
      $display("ratio %0d:%0d groups/bus=%0d defects=%0d unrepairable groups=%0d buses repaired=%0d/3",
               RM[r], RN[r], (1000 + RM[r] - 1) / RM[r], nfi[r], gfail[r], brep[r]);
      checks += chk[r]; failures += fail[r];
    end
    checks++;
    if (nfi.sum() == 0) begin failures++; $display("FAIL no defect injected"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
