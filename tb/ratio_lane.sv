// ratio_lane: testbench helper that exercises one M:N TSV group over many
// trials at a fixed per-TSV defect rate.
// Each trial clears all defects, makes every TSV defective with probability
// RATE_PPM / 1e6 (a 10 kOhm void or a 500 Ohm short, both detectable at a
// 1.5 GHz test clock), runs one test-and-repair and checks: both status words
// at the end of the test phase equal the injected set; exceed on both dies is
// set exactly when more than N TSVs are defective; otherwise both dies hold
// the "k-th good TSV" selects and random traffic crosses intact. Trials are
// grouped into buses of GROUPS groups; a bus counts as repaired when none of
// its groups exceeds the tolerance. Results are reported through the ports.
module ratio_lane #(
  parameter int unsigned M        = 4,
  parameter int unsigned N        = 2,
  parameter int unsigned GROUPS   = 250,
  parameter int unsigned BUSES    = 3,
  parameter int unsigned RATE_PPM = 10000
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures,
  output int   groups_failed,
  output int   buses_repaired,
  output int   faults_injected
);
  timeunit 1ps; timeprecision 1ps;
  import tsv_ft_pkg::*;
  localparam int W = M + N, K = sel_width(N), IW = cnt_width(M + N), INIT = 4;

  logic start = 0, si, xfer_en, clear, recover_en, busy, done;
  phase_e phase;
  logic [IW-1:0] test_idx, xfer_idx;
  logic [W-1:0] cap_en, status_d1, status_d2, st_d1, st_d2;
  logic [M-1:0] sig_in = '0, sig_out;
  logic [M-1:0][K-1:0] sel_d1, sel_d2;
  logic exceed_d1, exceed_d2;
  tsv_defect_t defect [W];
  tsv_defect_t link_defect [2];
  bit faulty [W];

  ft_sequencer #(.M(M), .N(N), .INIT_CYCLES(INIT)) u_seq (.*);
  tsv_ft_group #(.M(M), .N(N)) u_group (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0d:%0d %s", M, N, what); end
  endtask

  task automatic trial(output bit repaired);
    int nf = 0, clocks = 0, good = 0;
    for (int j = 0; j < W; j++) begin
      faulty[j] = ($urandom % 1000000) < RATE_PPM;
      defect[j] = !faulty[j] ? '{kind: DEF_NONE, r_ohm: 32'd0} :
                  ($urandom % 2) ? '{kind: DEF_OPEN, r_ohm: 32'd10000} : '{kind: DEF_SHORT, r_ohm: 32'd500};
      nf += faulty[j];
    end
    faults_injected += nf;
    @(posedge clk); #1; sig_in = M'($urandom); start = 1;
    @(posedge clk); #1; start = 0;
    while (busy) begin
      if (clocks == INIT + W + 1) begin st_d1 = status_d1; st_d2 = status_d2; end
      clocks++; @(posedge clk); #1;
    end
    for (int j = 0; j < W; j++)
      check(st_d1[W-1-j] == faulty[j] && st_d2[W-1-j] == faulty[j], $sformatf("status TSV%0d", j + 1));
    check(exceed_d1 == (nf > int'(N)) && exceed_d2 == (nf > int'(N)), $sformatf("exceed with %0d faults", nf));
    repaired = !exceed_d1;
    if (nf <= int'(N)) begin
      for (int j = 0; j < W && good < int'(M); j++) if (!faulty[j]) begin
        check(int'(sel_d1[good]) == j - good && int'(sel_d2[good]) == j - good, "selects");
        good++;
      end
      repeat (2) begin
        @(posedge clk); #1; sig_in = M'($urandom); #600;
        check(sig_out == sig_in, "traffic");
      end
    end
  endtask

  initial begin
    finished = 0; checks = 0; failures = 0; groups_failed = 0; buses_repaired = 0; faults_injected = 0;
    foreach (link_defect[l]) link_defect[l] = '{kind: DEF_NONE, r_ohm: 32'd0};
    foreach (defect[j]) defect[j] = '{kind: DEF_NONE, r_ohm: 32'd0};
    wait (rst_n);
    for (int b = 0; b < int'(BUSES); b++) begin
      automatic bit bus_ok = 1;
      for (int g = 0; g < int'(GROUPS); g++) begin
        automatic bit ok;
        trial(ok);
        if (!ok) begin groups_failed++; bus_ok = 0; end
      end
      buses_repaired += bus_ok;
    end
    finished = 1;
  end
endmodule
