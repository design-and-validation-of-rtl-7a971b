// ft_sequencer: phase sequencer of one online test-and-repair run.
//
// A start pulse (in normal operation) runs the schedule below for all TSV
// groups that share the sequencer, then returns to normal operation:
//  * INIT, INIT_CYCLES clocks: SI low, every observation flop captures '1',
//    every TSV driven low; the recovery controls are cleared;
//  * TEST, M+N+1 clocks, count c = 0 .. M+N: TSV c gets its rising
//    transition (c < M+N) and its observation flop captures at the end of
//    that clock; in the same clock the result of TSV c-1 (c >= 1) is shifted
//    into both status registers. So M+N clocks test the M+N TSVs one by one,
//    plus one clock to move the last result;
//  * RECOVER, M+N clocks: both status registers are shifted into their
//    recovery controls and the latch chains are rebuilt;
//  * done pulses for one clock as normal operation resumes.
// Total: 2(M+N) + INIT_CYCLES + 1 clocks. The 2(M+N) core follows the
// technique; the initialisation length, the extra transfer clock and the
// start/done handshake are choices of this design. INIT_CYCLES must cover
// the falling delay of a TSV that was carrying a '1'.
module ft_sequencer #(
  parameter  int unsigned M           = 4,
  parameter  int unsigned N           = 2,
  parameter  int unsigned INIT_CYCLES = 4,
  localparam int unsigned W  = M + N,
  localparam int unsigned IW = tsv_ft_pkg::cnt_width(M + N),
  localparam int unsigned CW = tsv_ft_pkg::cnt_width((INIT_CYCLES > M + N) ? INIT_CYCLES : M + N)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  output tsv_ft_pkg::phase_e phase,
  output logic               si,
  output logic [IW-1:0]      test_idx,
  output logic [W-1:0]       cap_en,
  output logic               xfer_en,
  output logic [IW-1:0]      xfer_idx,
  output logic               clear,
  output logic               recover_en,
  output logic               busy,
  output logic               done
);

  timeunit 1ps;
  timeprecision 1ps;

  import tsv_ft_pkg::*;

  phase_e        phase_q;
  logic [CW-1:0] cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_q <= PH_IDLE;
      cnt_q   <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (phase_q)
        PH_IDLE: if (start) begin
          phase_q <= PH_INIT;
          cnt_q   <= '0;
        end
        PH_INIT: if (cnt_q == CW'(INIT_CYCLES - 1)) begin
          phase_q <= PH_TEST;
          cnt_q   <= '0;
        end else cnt_q <= cnt_q + 1'b1;
        PH_TEST: if (cnt_q == CW'(W)) begin
          phase_q <= PH_RECOVER;
          cnt_q   <= '0;
        end else cnt_q <= cnt_q + 1'b1;
        PH_RECOVER: if (cnt_q == CW'(W - 1)) begin
          phase_q <= PH_IDLE;
          cnt_q   <= '0;
          done    <= 1'b1;
        end else cnt_q <= cnt_q + 1'b1;
        default: phase_q <= PH_IDLE;
      endcase
    end
  end

  always_comb begin
    phase      = phase_q;
    si         = (phase_q != PH_INIT);
    test_idx   = (phase_q == PH_TEST) ? IW'(cnt_q) : '0;
    xfer_en    = (phase_q == PH_TEST) && (cnt_q != '0);
    xfer_idx   = IW'(cnt_q - 1'b1);
    clear      = (phase_q == PH_INIT);
    recover_en = (phase_q == PH_RECOVER);
    busy       = (phase_q != PH_IDLE);
    cap_en     = '0;
    if (phase_q == PH_INIT) cap_en = '1;
    else if (phase_q == PH_TEST) begin
      for (int j = 0; j < int'(W); j++) cap_en[j] = (cnt_q == CW'(j));
    end
  end

endmodule
