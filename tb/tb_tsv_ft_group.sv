// tb_tsv_ft_group: end-to-end test of one 4:2 TSV group with its sequencer.
// Scenarios, each followed by checks of both dies' status registers and
// selects, the exceed flags, the run length and random traffic from die 1
// to die 2:
//  1. no defect: status 000000, default routing;
//  2. in-field defects while traffic runs: TSV2 void (10 kOhm) and TSV4
//     short (500 Ohm): status 010100, selects 00 01 10 10 on both dies;
//  3. a benign void (3 kOhm) on TSV1 and one dead link TSV: not flagged,
//     status still reaches die 1 over the other link TSV;
//  4. TSV1 and the last redundant TSV faulty: every line shifted by one;
//  5. three faulty TSVs: exceed on both dies.
// Voids of 50 kOhm and more discharge slower than the initialisation
// phase, so those runs start from an idle (low) bus.
module tb_tsv_ft_group;
  timeunit 1ps; timeprecision 1ps;
  import tsv_ft_pkg::*;
  localparam int M = 4, N = 2, W = 6, K = 2, INIT = 4;
  logic clk = 0, rst_n = 0, start = 0;
  phase_e phase;
  logic si, xfer_en, clear, recover_en, busy, done;
  logic [2:0] test_idx, xfer_idx;
  logic [W-1:0] cap_en, status_d1, status_d2;
  logic [M-1:0] sig_in = '0, sig_out;
  logic [M-1:0][K-1:0] sel_d1, sel_d2;
  logic exceed_d1, exceed_d2;
  tsv_defect_t defect [W];
  tsv_defect_t link_defect [2];
  int checks = 0, failures = 0;
  bit seen = 0;
  logic [W-1:0] st_d1, st_d2;  // status words at the end of the test phase

  ft_sequencer #(.M(M), .N(N), .INIT_CYCLES(INIT)) u_seq (.*);
  tsv_ft_group #(.M(M), .N(N)) dut (.*);

  always #333 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic traffic(input int n);
    for (int k = 0; k < n; k++) begin
      @(posedge clk); #1; sig_in = M'($urandom); #600;
      check(sig_out == sig_in, $sformatf("traffic in %b out %b", sig_in, sig_out));
    end
  endtask

  // run one test-and-repair; with quiet the bus idles low for 30 clocks
  // first, otherwise random traffic runs up to the start
  task automatic run(output int clocks, input bit quiet = 0);
    clocks = 0;
    if (quiet) begin @(posedge clk); #1; sig_in = '0; repeat (30) @(posedge clk); end
    @(posedge clk); #1; sig_in = quiet ? '0 : M'($urandom); start = 1;
    @(posedge clk); #1; start = 0;
    while (busy) begin
      if (phase == PH_RECOVER && !seen) begin
        st_d1 = status_d1; st_d2 = status_d2; seen = 1;
      end
      clocks++; @(posedge clk); #1;
    end
    seen = 0;
    check(status_d1 == '0 && status_d2 == '0, "status registers drained by recovery");
  endtask

  function automatic logic [M-1:0][K-1:0] exp_sel(input logic [W-1:0] faulty);  // bit j = TSV j+1
    logic [M-1:0][K-1:0] r = '0;
    int g = 0;
    for (int j = 0; j < W && g < M; j++) if (!faulty[j]) begin r[g] = K'(j - g); g++; end
    return r;
  endfunction

  function automatic logic [W-1:0] reversed(input logic [W-1:0] f);
    logic [W-1:0] r;
    for (int j = 0; j < W; j++) r[W-1-j] = f[j];
    return r;
  endfunction

  task automatic expect_state(input logic [W-1:0] faulty, input string name);
    bit exc = $countones(faulty) > N;
    check(st_d2 == reversed(faulty), $sformatf("%s: die-2 status %b", name, st_d2));
    check(st_d1 == reversed(faulty), $sformatf("%s: die-1 status %b", name, st_d1));
    check(exceed_d1 == exc && exceed_d2 == exc, $sformatf("%s: exceed %b %b", name, exceed_d1, exceed_d2));
    if (!exc) begin
      check(sel_d1 == exp_sel(faulty), $sformatf("%s: die-1 selects", name));
      check(sel_d2 == exp_sel(faulty), $sformatf("%s: die-2 selects", name));
      traffic(40);
    end
  endtask

  int clocks;

  initial begin
    foreach (defect[j]) defect[j] = '{kind: DEF_NONE, r_ohm: 32'd0};
    foreach (link_defect[l]) link_defect[l] = '{kind: DEF_NONE, r_ohm: 32'd0};
    repeat (3) @(posedge clk); rst_n = 1;
    traffic(20);

    // 1. defect free
    run(clocks);
    check(clocks == 2 * W + INIT + 1, $sformatf("run length %0d clocks", clocks));
    expect_state(6'b000000, "defect free");

    // 2. the printed example: TSV2 void, TSV4 short, appearing in the field
    @(posedge clk); #1; sig_in = '1; #5000;
    defect[1] = '{kind: DEF_OPEN, r_ohm: 32'd10000};
    defect[3] = '{kind: DEF_SHORT, r_ohm: 32'd500};
    run(clocks);
    expect_state(6'b001010, "TSV2+TSV4");
    check(sel_d1 == '{2'b10, 2'b10, 2'b01, 2'b00}, "example selects 00 01 10 10");

    // 3. benign void on TSV1, one dead link TSV
    defect[0] = '{kind: DEF_OPEN, r_ohm: 32'd3000};
    link_defect[0] = '{kind: DEF_SHORT, r_ohm: 32'd0};
    run(clocks);
    expect_state(6'b001010, "benign void + dead link TSV");

    // 4. TSV1 and redundant TSV2 faulty
    foreach (defect[j]) defect[j] = '{kind: DEF_NONE, r_ohm: 32'd0};
    defect[0] = '{kind: DEF_OPEN, r_ohm: 32'd50000};
    defect[5] = '{kind: DEF_SHORT, r_ohm: 32'd1000};
    run(clocks, 1);
    expect_state(6'b100001, "TSV1 + redundant TSV2");

    // 5. three faulty TSVs
    defect[2] = '{kind: DEF_OPEN, r_ohm: 32'd100000};
    run(clocks, 1);
    expect_state(6'b100101, "three faults");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
