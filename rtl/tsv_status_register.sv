// tsv_status_register: the (M+N)-bit TSV status register of one die.
//
// Holds one bit per TSV of the group, '1' for a faulty TSV and '0' for a
// fault-free one. It is a plain shift register: bits enter at the LSB end
// and leave at the MSB end, so after M+N shifts during the test phase the
// result of TSV1 (the first TSV tested) sits in the MSB, and the word reads
// left to right in TSV order exactly as it is printed for the 4:2 example
// ('010100' = TSV2 and TSV4 faulty). During recovery the register shifts
// the same way, MSB first, with zeros shifted in behind.
//
// Interface: shift_en/sin shift one bit per clock; sout is the MSB (the bit
// the next shift removes); q is the whole word. Reset clears it to all
// fault-free so that the routing starts in its default mapping.
// The bit order and the zero fill follow the recovery waveform of the
// technique; the reset value is a choice of this design.
module tsv_status_register #(
  parameter int unsigned W = 6  // M+N TSVs in the group
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         shift_en,
  input  logic         sin,
  output logic         sout,
  output logic [W-1:0] q
);

  timeunit 1ps;
  timeprecision 1ps;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        q <= '0;
    else if (shift_en) q <= {q[W-2:0], sin};
  end

  assign sout = q[W-1];

endmodule
