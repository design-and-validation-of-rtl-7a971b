// tb_tsv_ft_top: end-to-end test of the whole bus at its default size,
// 20 groups of 50:5 (1000 signal lines, 1100 TSVs), no parameter overrides.
// Three test-and-repair runs, each followed by checks of every group's
// status words on both dies (sampled at the end of the test phase), exceed
// flags, selects, run length and random traffic over all 1000 lines:
//  run 0: no defect;
//  run 1: group g gets g mod 7 faulty TSVs (voids of 5-10 kOhm or shorts of
//         0-1 kOhm at random places), so groups with 6 faults must report
//         exceed; benign defects (3 kOhm void, 5 kOhm short) are added that
//         must not be flagged, and one link TSV of every third group is dead;
//  run 2: in-field growth, one more void in every group with fewer than
//         five faults, tested while traffic runs.
// Mechanisms counted (each must occur): void detected, short detected,
// benign defect passed, redundant TSV used by a line, tolerance exceeded,
// dead link TSV tolerated, traffic delivered over a repaired group, repeated
// online run.
module tb_tsv_ft_top;
  timeunit 1ps; timeprecision 1ps;
  import tsv_ft_pkg::*;
  localparam int M = 50, N = 5, G = 20, W = 55, K = 3, INIT = 4;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [G*M-1:0] sig_in = '0, sig_out;
  tsv_defect_t defect [G*W];
  tsv_defect_t link_defect [G*2];
  logic [G-1:0] exceed_d1, exceed_d2;
  logic [G*W-1:0] status_d1, status_d2, st_d1, st_d2;
  logic [G*M*K-1:0] sel_d1, sel_d2;
  int checks = 0, failures = 0;
  bit faulty [G][W];   // expected classification
  int m_void = 0, m_short = 0, m_benign = 0, m_redundant = 0, m_exceed = 0,
      m_link = 0, m_traffic = 0, m_runs = 0;

  tsv_ft_top dut (.*);

  always #333 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic randomize_bus();
    for (int b = 0; b < G * M; b++) sig_in[b] = 1'($urandom);
  endtask

  function automatic int nfaults(input int g);
    int n = 0;
    for (int j = 0; j < W; j++) n += faulty[g][j];
    return n;
  endfunction

  task automatic run();
    int clocks = 0;
    @(posedge clk); #1; randomize_bus(); start = 1;
    @(posedge clk); #1; start = 0;
    while (busy) begin
      if (clocks == INIT + W + 1) begin st_d1 = status_d1; st_d2 = status_d2; end
      clocks++; @(posedge clk); #1;
    end
    check(clocks == 2 * W + INIT + 1, $sformatf("run length %0d", clocks));
    m_runs++;
  endtask

  task automatic verify(input string name);
    for (int g = 0; g < G; g++) begin
      int nf = nfaults(g), good = 0;
      bit exc = nf > N;
      for (int j = 0; j < W; j++) begin
        check(st_d2[g*W + W-1-j] == faulty[g][j], $sformatf("%s g%0d TSV%0d die-2 status", name, g, j + 1));
        check(st_d1[g*W + W-1-j] == faulty[g][j], $sformatf("%s g%0d TSV%0d die-1 status", name, g, j + 1));
      end
      check(exceed_d1[g] == exc && exceed_d2[g] == exc, $sformatf("%s g%0d exceed", name, g));
      if (exc && exceed_d1[g]) m_exceed++;
      if (!exc) begin
        for (int j = 0; j < W && good < M; j++) if (!faulty[g][j]) begin
          int s1 = int'(sel_d1[(g*M + good)*K +: K]);
          int s2 = int'(sel_d2[(g*M + good)*K +: K]);
          check(s1 == j - good && s2 == j - good, $sformatf("%s g%0d line %0d select", name, g, good));
          if (j >= M && s1 == j - good) m_redundant++;
          good++;
        end
      end
    end
  endtask

  task automatic traffic(input int n);
    for (int k = 0; k < n; k++) begin
      @(posedge clk); #1; randomize_bus(); #600;
      for (int g = 0; g < G; g++) if (nfaults(g) <= N) begin
        check(sig_out[g*M +: M] == sig_in[g*M +: M], $sformatf("traffic group %0d", g));
        if (nfaults(g) > 0 && sig_out[g*M +: M] == sig_in[g*M +: M]) m_traffic++;
      end
    end
  endtask

  task automatic add_fault(input int g, input int j, input bit grow);
    int r = $urandom % 4;
    faulty[g][j] = 1;
    if (grow || r < 2) begin
      defect[g*W + j] = '{kind: DEF_OPEN, r_ohm: (r == 0) ? 32'd5000 : 32'd10000};
      m_void++;
    end else begin
      defect[g*W + j] = '{kind: DEF_SHORT, r_ohm: (r == 2) ? 32'd0 : 32'd1000};
      m_short++;
    end
  endtask

  function automatic int free_tsv(input int g);
    int j;
    do j = $urandom % W; while (faulty[g][j] || defect[g*W + j].kind != DEF_NONE);
    return j;
  endfunction

  initial begin
    foreach (defect[i]) defect[i] = '{kind: DEF_NONE, r_ohm: 32'd0};
    foreach (link_defect[i]) link_defect[i] = '{kind: DEF_NONE, r_ohm: 32'd0};
    foreach (faulty[g, j]) faulty[g][j] = 0;
    repeat (3) @(posedge clk); rst_n = 1;

    run(); verify("run0"); traffic(5);

    for (int g = 0; g < G; g++) begin
      for (int e = 0; e < g % 7; e++) add_fault(g, free_tsv(g), 0);
      begin
        automatic int b = free_tsv(g);
        defect[g*W + b] = (g % 2) ? '{kind: DEF_OPEN, r_ohm: 32'd3000} : '{kind: DEF_SHORT, r_ohm: 32'd5000};
        m_benign++;
      end
      if (g % 3 == 0) begin
        link_defect[2*g + (g % 2)] = '{kind: DEF_SHORT, r_ohm: 32'd0};
        m_link++;
      end
    end
    run(); verify("run1"); traffic(10);

    for (int g = 0; g < G; g++) if (nfaults(g) < N) add_fault(g, free_tsv(g), 1);
    run(); verify("run2"); traffic(10);

    $display("mechanisms: void=%0d short=%0d benign=%0d redundant_used=%0d exceed=%0d dead_link=%0d repaired_traffic=%0d runs=%0d",
             m_void, m_short, m_benign, m_redundant, m_exceed, m_link, m_traffic, m_runs);
    check(m_void > 0, "void detected");
    check(m_short > 0, "short detected");
    check(m_benign > 0, "benign defect passed");
    check(m_redundant > 0, "redundant TSV used");
    check(m_exceed > 0, "tolerance exceeded");
    check(m_link > 0, "dead link TSV tolerated");
    check(m_traffic > 0, "traffic over repaired groups");
    check(m_runs >= 3, "repeated online runs");
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
