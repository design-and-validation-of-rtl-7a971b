// tsv_ft_group: one TSV group of grouping ratio M:N across two stacked dies.
//
// M signal lines cross from die 1 to die 2 over M regular and N redundant
// TSVs. The group holds:
//  * die 1: test input unit, routing demultiplexers, recovery block;
//  * the M+N signal TSVs and a double-TSV link (two TSVs in parallel) that
//    carries the test results from die 2 to die 1, all as behavioural TSV
//    models with fault injection;
//  * die 2: test observation (NAND + capture flop per TSV), routing
//    multiplexers, recovery block.
// The phase signals come from a sequencer shared by all groups. In normal
// operation sig_in[i] reaches sig_out[i] combinationally through whichever
// TSV the latch chains select; a test-and-repair run finds the faulty TSVs,
// writes the same status word into both dies' status registers and rebuilds
// both latch chains, so that every line uses a fault-free TSV while at most
// N TSVs are faulty. exceed_d1/exceed_d2 report more than N faulty TSVs.
// The two link TSVs are joined at die 1 so that either one alone carries a
// '1'; that joining is this design's reading of the double-TSV link.
module tsv_ft_group #(
  parameter  int unsigned M = 4,
  parameter  int unsigned N = 2,
  localparam int unsigned W  = M + N,
  localparam int unsigned K  = tsv_ft_pkg::sel_width(N),
  localparam int unsigned IW = tsv_ft_pkg::cnt_width(M + N)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // shared phase control
  input  tsv_ft_pkg::phase_e      phase,
  input  logic                    si,
  input  logic [IW-1:0]           test_idx,
  input  logic [W-1:0]            cap_en,
  input  logic                    xfer_en,
  input  logic [IW-1:0]           xfer_idx,
  input  logic                    clear,
  input  logic                    recover_en,
  // functional signals
  input  logic [M-1:0]            sig_in,
  output logic [M-1:0]            sig_out,
  // fault injection into the TSV models
  input  tsv_ft_pkg::tsv_defect_t defect      [W],
  input  tsv_ft_pkg::tsv_defect_t link_defect [2],
  // status
  output logic [W-1:0]            status_d1,
  output logic [W-1:0]            status_d2,
  output logic [M-1:0][K-1:0]     sel_d1,
  output logic [M-1:0][K-1:0]     sel_d2,
  output logic                    exceed_d1,
  output logic                    exceed_d2
);

  timeunit 1ps;
  timeprecision 1ps;

  logic [M-1:0]        line_sig;
  logic [M-1:0][K-1:0] line_sel;
  logic [W-1:0]        tsv_t1, tsv_t2;
  logic [W-1:0]        test_result, obs;
  logic                result_bit;
  logic [1:0]          link_t2;
  logic                lines_done_d1, lines_done_d2;

  // ---------------- die 1 ----------------
  test_input #(.M(M), .N(N)) u_test_input (
    .phase    (phase),
    .test_idx (test_idx),
    .func_sig (sig_in),
    .func_sel (sel_d1),
    .line_sig (line_sig),
    .line_sel (line_sel)
  );

  routing_demux #(.M(M), .N(N)) u_demux (
    .sig (line_sig),
    .sel (line_sel),
    .tsv (tsv_t1)
  );

  recovery_block #(.M(M), .N(N)) u_recovery_d1 (
    .clk          (clk),
    .rst_n        (rst_n),
    .load_en      (xfer_en),
    .load_bit     (link_t2[0] | link_t2[1]),
    .clear        (clear),
    .recover_en   (recover_en),
    .sel          (sel_d1),
    .status       (status_d1),
    .line_count   (),
    .faulty_count (),
    .lines_done   (lines_done_d1),
    .exceed       (exceed_d1)
  );

  // ---------------- TSVs ----------------
  for (genvar j = 0; j < int'(W); j++) begin : g_tsv
    tsv_model u_tsv (.t1(tsv_t1[j]), .defect(defect[j]), .t2(tsv_t2[j]));
  end

  for (genvar l = 0; l < 2; l++) begin : g_link
    tsv_model u_link (.t1(result_bit), .defect(link_defect[l]), .t2(link_t2[l]));
  end

  // ---------------- die 2 ----------------
  test_observation #(.W(W)) u_observe (
    .clk         (clk),
    .rst_n       (rst_n),
    .si          (si),
    .t2          (tsv_t2),
    .cap_en      (cap_en),
    .xfer_idx    (xfer_idx),
    .test_result (test_result),
    .obs         (obs),
    .serial_out  (result_bit)
  );

  recovery_block #(.M(M), .N(N)) u_recovery_d2 (
    .clk          (clk),
    .rst_n        (rst_n),
    .load_en      (xfer_en),
    .load_bit     (result_bit),
    .clear        (clear),
    .recover_en   (recover_en),
    .sel          (sel_d2),
    .status       (status_d2),
    .line_count   (),
    .faulty_count (),
    .lines_done   (lines_done_d2),
    .exceed       (exceed_d2)
  );

  routing_mux #(.M(M), .N(N)) u_mux (
    .tsv (tsv_t2),
    .sel (sel_d2),
    .sig (sig_out)
  );

endmodule
