// latch_chain: stores the TSV select of every signal line of a group.
//
// M entries of K = ceil(log2(N+1)) bits. Entry i is the select S(i+1) of
// signal line i+1: the offset, 0..N, of the TSV that line uses from its
// default TSV. The chain is loaded serially: each enabled clock shifts a new
// entry in at the bottom (line M) and moves every entry up by one line, so
// after M enables the first value scanned in sits at the top (line 1).
// This is the loading order of the reconfiguration example (four scans give
// 00, 01, 10, 10 for lines 1..4).
//
// Interface: en shifts din in; sel presents all M selects in parallel to the
// routing block. The storage elements are edge-triggered flops (the area
// estimate counts them as flip-flops); reset to all zero, the default
// one-to-one mapping, is a choice of this design.
module latch_chain #(
  parameter  int unsigned M = 4,
  parameter  int unsigned N = 2,
  localparam int unsigned K = tsv_ft_pkg::sel_width(N)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic [K-1:0]        din,
  output logic [M-1:0][K-1:0] sel
);

  timeunit 1ps;
  timeprecision 1ps;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel <= '0;
    end else if (en) begin
      for (int i = 0; i < int'(M) - 1; i++) sel[i] <= sel[i+1];
      sel[M-1] <= din;
    end
  end

endmodule
