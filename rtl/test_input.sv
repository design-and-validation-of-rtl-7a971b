// test_input: die-1 input signal unit of the detection block.
//
// Sits in front of the routing demultiplexers and chooses what the signal
// lines and their selects carry:
//  * normal operation (phase IDLE or RECOVER): the functional inputs and the
//    selects from the latch chain pass unchanged;
//  * INIT: every line is held low, so every TSV is discharged;
//  * TEST with test_idx = j < M+N: one rising transition is launched on TSV j
//    through the routing block itself. The line used is j for a regular TSV
//    and line M for a redundant one (the only line that reaches every
//    redundant TSV), with select j - line; that line is high and all others
//    low, so TSV j rises while the TSV tested before falls back. At
//    test_idx = M+N (the last transfer cycle) all lines are low.
// Purely combinational; the launch edge is the clock edge that moves
// test_idx. Launching through the demultiplexers follows the detection
// block drawing (test patterns enter on a signal line); testing one TSV per
// clock follows the M+N test cycles of the technique; the choice of line per
// TSV is this design's.
module test_input #(
  parameter  int unsigned M = 4,
  parameter  int unsigned N = 2,
  localparam int unsigned W  = M + N,
  localparam int unsigned K  = tsv_ft_pkg::sel_width(N),
  localparam int unsigned IW = tsv_ft_pkg::cnt_width(M + N)
) (
  input  tsv_ft_pkg::phase_e  phase,
  input  logic [IW-1:0]       test_idx,
  input  logic [M-1:0]        func_sig,
  input  logic [M-1:0][K-1:0] func_sel,
  output logic [M-1:0]        line_sig,
  output logic [M-1:0][K-1:0] line_sel
);

  timeunit 1ps;
  timeprecision 1ps;

  import tsv_ft_pkg::*;

  always_comb begin
    line_sig = func_sig;
    line_sel = func_sel;
    if (phase == PH_INIT) begin
      line_sig = '0;
      line_sel = '0;
    end else if (phase == PH_TEST) begin
      line_sig = '0;
      line_sel = '0;
      for (int j = 0; j < int'(W); j++) begin
        if (test_idx == IW'(j)) begin
          if (j < int'(M)) begin
            line_sig[j] = 1'b1;
          end else begin
            line_sig[M-1] = 1'b1;
            line_sel[M-1] = K'(j - int'(M) + 1);
          end
        end
      end
    end
  end

endmodule
