// recovery_control: the control unit of the recovery block of one die.
//
// It consumes the TSV status register one bit per clock (TSV1 first) and
// holds three parts of the reconfiguration circuit:
//  * the faulty TSV accumulator, an adder that counts the '1' bits seen so
//    far; its output (count including the current bit) is the select value
//    offered to the latch chain, because every faulty TSV passed pushes all
//    remaining signal lines one TSV further along;
//  * the signal line counter, which counts the '0' bits (fault-free TSVs)
//    seen while fewer than M lines are configured. On such a bit it raises
//    latch_en so that the latch chain scans in the accumulator output, and
//    once it reaches M it keeps the chain disabled;
//  * the comparator, which flags exceed when the accumulated number of
//    faulty TSVs is larger than the tolerance limit (N for an M:N group).
//
// Timing: clear (one clock) resets the accumulator and the counter before a
// run. While en is high, each clock handles one status bit, so M+N clocks
// process a group. latch_en and acc_out are combinational from status_bit.
// The accumulator is wide enough to count all M+N TSVs, so the comparator
// sees the true count; acc_out passes its low K bits, which is exact
// whenever the group is repairable. The counting rules and the widths of
// the selects follow the technique; clear and the accumulator width are
// choices of this design.
module recovery_control #(
  parameter  int unsigned M = 4,
  parameter  int unsigned N = 2,
  localparam int unsigned K  = tsv_ft_pkg::sel_width(N),
  localparam int unsigned AW = tsv_ft_pkg::cnt_width(M + N),
  localparam int unsigned CW = tsv_ft_pkg::cnt_width(M)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          en,
  input  logic          status_bit,
  input  logic [AW-1:0] tol_limit,
  output logic          latch_en,
  output logic [K-1:0]  acc_out,
  output logic [CW-1:0] line_count,
  output logic [AW-1:0] faulty_count,
  output logic          lines_done,
  output logic          exceed
);

  timeunit 1ps;
  timeprecision 1ps;

  logic [AW-1:0] acc_q, acc_sum;
  logic [CW-1:0] cnt_q;

  // faulty TSV accumulator (adder)
  assign acc_sum    = acc_q + AW'(status_bit);
  assign acc_out    = acc_sum[K-1:0];

  // signal line counter
  assign lines_done = (cnt_q == CW'(M));
  assign latch_en   = en && !status_bit && !lines_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q <= '0;
      cnt_q <= '0;
    end else if (clear) begin
      acc_q <= '0;
      cnt_q <= '0;
    end else if (en) begin
      acc_q <= acc_sum;
      if (latch_en) cnt_q <= cnt_q + 1'b1;
    end
  end

  assign line_count   = cnt_q;
  assign faulty_count = acc_q;

  // comparator against the tolerance limit
  assign exceed = (acc_q > tol_limit);

endmodule
