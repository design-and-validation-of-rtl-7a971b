// recovery_block: the recovery block of one die of a TSV group.
//
// Built from the TSV status register, the recovery control (faulty TSV
// accumulator, signal line counter, comparator) and the latch chain. The
// same block sits on both dies; on die 1 its selects drive the
// demultiplexers of the routing block, on die 2 the multiplexers.
//
// Operation:
//  * test phase: load_en shifts the result of one TSV (load_bit) into the
//    status register per clock, TSV1 first, M+N clocks in all;
//  * clear: one clock that zeroes the accumulator and counter;
//  * recovery phase: recover_en shifts the status register out MSB first,
//    one bit per clock, into the control; every fault-free TSV found while
//    lines remain unconfigured scans the accumulator value into the latch
//    chain. After M+N clocks the chain holds the select of every line, and
//    exceed reports more faulty TSVs than the tolerance limit.
// load_en and recover_en are never high together (the sequencer ensures
// it). The tolerance limit is fixed at N, the number of redundant TSVs.
module recovery_block #(
  parameter  int unsigned M = 4,
  parameter  int unsigned N = 2,
  localparam int unsigned W  = M + N,
  localparam int unsigned K  = tsv_ft_pkg::sel_width(N),
  localparam int unsigned AW = tsv_ft_pkg::cnt_width(M + N),
  localparam int unsigned CW = tsv_ft_pkg::cnt_width(M)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load_en,
  input  logic                load_bit,
  input  logic                clear,
  input  logic                recover_en,
  output logic [M-1:0][K-1:0] sel,
  output logic [W-1:0]        status,
  output logic [CW-1:0]       line_count,
  output logic [AW-1:0]       faulty_count,
  output logic                lines_done,
  output logic                exceed
);

  timeunit 1ps;
  timeprecision 1ps;

  logic          status_bit;
  logic          latch_en;
  logic [K-1:0]  acc_out;

  tsv_status_register #(.W(W)) u_status (
    .clk      (clk),
    .rst_n    (rst_n),
    .shift_en (load_en || recover_en),
    .sin      (load_en && load_bit),
    .sout     (status_bit),
    .q        (status)
  );

  recovery_control #(.M(M), .N(N)) u_ctrl (
    .clk          (clk),
    .rst_n        (rst_n),
    .clear        (clear),
    .en           (recover_en),
    .status_bit   (status_bit),
    .tol_limit    (AW'(N)),
    .latch_en     (latch_en),
    .acc_out      (acc_out),
    .line_count   (line_count),
    .faulty_count (faulty_count),
    .lines_done   (lines_done),
    .exceed       (exceed)
  );

  latch_chain #(.M(M), .N(N)) u_chain (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (latch_en),
    .din   (acc_out),
    .sel   (sel)
  );

  // rule of the sequencer: the register is never loaded and drained at once
  a_no_load_and_recover: assert property (@(posedge clk) disable iff (!rst_n)
    !(load_en && recover_en));

endmodule
