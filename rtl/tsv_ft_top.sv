// tsv_ft_top: online TSV fault tolerance for a die-to-die bus of G groups.
//
// GROUPS TSV groups of grouping ratio M:N (default 20 groups of 50:5, i.e.
// 1000 signal lines over 1000 regular and 100 redundant TSVs) share one
// phase sequencer. A start pulse tests every TSV of every group with a
// transition delay test and re-routes each group's lines around its faulty
// TSVs; the groups work in parallel, so a run takes 2(M+N) + INIT_CYCLES + 1
// clocks whatever the number of groups. busy is high during a run and done
// pulses at its end; exceed_d1/exceed_d2 flag groups with more than N
// faulty TSVs. sig_in/sig_out are the functional lines, flattened group by
// group (line i of group g is bit g*M+i). defect/link_defect inject defects
// into the behavioural TSV models, the signal TSVs of group g being entries
// g*(M+N) .. g*(M+N)+M+N-1.
// The 50:5 ratio and the 1000 regular TSVs are the configuration with the
// lowest area at full repair capability; sharing one sequencer is this
// design's choice.
module tsv_ft_top #(
  parameter  int unsigned M           = 50,
  parameter  int unsigned N           = 5,
  parameter  int unsigned GROUPS      = 20,
  parameter  int unsigned INIT_CYCLES = 4,
  localparam int unsigned W  = M + N,
  localparam int unsigned K  = tsv_ft_pkg::sel_width(N),
  localparam int unsigned IW = tsv_ft_pkg::cnt_width(M + N)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  output logic                    busy,
  output logic                    done,
  input  logic [GROUPS*M-1:0]     sig_in,
  output logic [GROUPS*M-1:0]     sig_out,
  input  tsv_ft_pkg::tsv_defect_t defect      [GROUPS*W],
  input  tsv_ft_pkg::tsv_defect_t link_defect [GROUPS*2],
  output logic [GROUPS-1:0]       exceed_d1,
  output logic [GROUPS-1:0]       exceed_d2,
  output logic [GROUPS*W-1:0]     status_d1,
  output logic [GROUPS*W-1:0]     status_d2,
  output logic [GROUPS*M*K-1:0]   sel_d1,
  output logic [GROUPS*M*K-1:0]   sel_d2
);

  timeunit 1ps;
  timeprecision 1ps;

  tsv_ft_pkg::phase_e phase;
  logic               si, xfer_en, clear, recover_en;
  logic [IW-1:0]      test_idx, xfer_idx;
  logic [W-1:0]       cap_en;

  ft_sequencer #(.M(M), .N(N), .INIT_CYCLES(INIT_CYCLES)) u_seq (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (start),
    .phase      (phase),
    .si         (si),
    .test_idx   (test_idx),
    .cap_en     (cap_en),
    .xfer_en    (xfer_en),
    .xfer_idx   (xfer_idx),
    .clear      (clear),
    .recover_en (recover_en),
    .busy       (busy),
    .done       (done)
  );

  for (genvar g = 0; g < int'(GROUPS); g++) begin : g_group
    tsv_ft_pkg::tsv_defect_t grp_defect [W];
    tsv_ft_pkg::tsv_defect_t grp_link   [2];
    logic [M-1:0][K-1:0]     grp_sel_d1, grp_sel_d2;

    for (genvar j = 0; j < int'(W); j++) begin : g_def
      assign grp_defect[j] = defect[g*W+j];
    end
    assign grp_link[0] = link_defect[2*g];
    assign grp_link[1] = link_defect[2*g+1];

    tsv_ft_group #(.M(M), .N(N)) u_group (
      .clk         (clk),
      .rst_n       (rst_n),
      .phase       (phase),
      .si          (si),
      .test_idx    (test_idx),
      .cap_en      (cap_en),
      .xfer_en     (xfer_en),
      .xfer_idx    (xfer_idx),
      .clear       (clear),
      .recover_en  (recover_en),
      .sig_in      (sig_in[g*M +: M]),
      .sig_out     (sig_out[g*M +: M]),
      .defect      (grp_defect),
      .link_defect (grp_link),
      .status_d1   (status_d1[g*W +: W]),
      .status_d2   (status_d2[g*W +: W]),
      .sel_d1      (grp_sel_d1),
      .sel_d2      (grp_sel_d2),
      .exceed_d1   (exceed_d1[g]),
      .exceed_d2   (exceed_d2[g])
    );

    assign sel_d1[g*M*K +: M*K] = grp_sel_d1;
    assign sel_d2[g*M*K +: M*K] = grp_sel_d2;
  end

endmodule
