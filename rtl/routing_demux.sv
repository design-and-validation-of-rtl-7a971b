// routing_demux: die-1 routing block of a TSV group (demultiplexers).
//
// Each of the M signal lines has a 1-to-(N+1) demultiplexer whose outputs
// reach TSVs i .. i+N (line i, TSV numbering from 0). The line's select
// sel[i] (0..N) picks the output; every other output of that demultiplexer
// is held low. A TSV's driver is the OR of the demultiplexer outputs that
// reach it, which is exact because the recovery block never gives two lines
// the same TSV; a TSV that no line selects is driven low. A select above N,
// possible only when N+1 is not a power of two, drives nothing.
// Purely combinational. The line-to-TSV reach follows the technique; the
// low level on unused outputs is a choice of this design.
module routing_demux #(
  parameter  int unsigned M = 4,
  parameter  int unsigned N = 2,
  localparam int unsigned W = M + N,
  localparam int unsigned K = tsv_ft_pkg::sel_width(N)
) (
  input  logic [M-1:0]        sig,
  input  logic [M-1:0][K-1:0] sel,
  output logic [W-1:0]        tsv
);

  timeunit 1ps;
  timeprecision 1ps;

  always_comb begin
    tsv = '0;
    for (int i = 0; i < int'(M); i++) begin
      for (int s = 0; s <= int'(N); s++) begin
        if (sel[i] == K'(s)) tsv[i+s] = tsv[i+s] | sig[i];
      end
    end
  end

endmodule
