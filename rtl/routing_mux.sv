// routing_mux: die-2 routing block of a TSV group (multiplexers).
//
// Each of the M output signal lines has an (N+1)-to-1 multiplexer over TSVs
// i .. i+N (line i, TSV numbering from 0); sel[i] (0..N) picks the TSV whose
// received value drives the line. It mirrors routing_demux on die 1 and is
// driven by the same select values, computed independently by the die-2
// recovery block from the same status word. A select above N gives a low
// output. Purely combinational.
module routing_mux #(
  parameter  int unsigned M = 4,
  parameter  int unsigned N = 2,
  localparam int unsigned W = M + N,
  localparam int unsigned K = tsv_ft_pkg::sel_width(N)
) (
  input  logic [W-1:0]        tsv,
  input  logic [M-1:0][K-1:0] sel,
  output logic [M-1:0]        sig
);

  timeunit 1ps;
  timeprecision 1ps;

  always_comb begin
    sig = '0;
    for (int i = 0; i < int'(M); i++) begin
      for (int s = 0; s <= int'(N); s++) begin
        if (sel[i] == K'(s)) sig[i] = tsv[i+s];
      end
    end
  end

endmodule
