// tsv_ft_pkg: types and helpers shared by the TSV fault-tolerance blocks.
//
// A TSV group with grouping ratio M:N carries M signal lines over M regular
// and N redundant TSVs (M+N in all) and tolerates up to N defective TSVs.
// Signal line i (numbered from 0 here) can use TSV i .. i+N, so each line
// needs a select of sel_width(N) = ceil(log2(N+1)) bits; the select is the
// offset of the TSV used from the line's default TSV.
//
// The defect descriptor is used only by the behavioural TSV model: it names
// one of the three defect classes the technique targets (void and
// delamination both act as a series resistance, short-to-substrate as a
// resistance to the substrate) and the defect resistance in ohms.
package tsv_ft_pkg;

  timeunit 1ps;
  timeprecision 1ps;

  typedef enum logic [1:0] {
    DEF_NONE  = 2'd0,  // defect-free TSV
    DEF_OPEN  = 2'd1,  // void or delamination: series resistance r_ohm
    DEF_SHORT = 2'd2   // pinhole short to substrate: shunt resistance r_ohm
  } tsv_defect_e;

  typedef struct packed {
    tsv_defect_e kind;
    logic [31:0] r_ohm;
  } tsv_defect_t;

  // Phases of one online test-and-repair run (see ft_sequencer).
  typedef enum logic [1:0] {
    PH_IDLE    = 2'd0,  // normal operation, routing held
    PH_INIT    = 2'd1,  // all TSVs driven low, observation flops set to 1
    PH_TEST    = 2'd2,  // one rising transition per TSV, results shifted out
    PH_RECOVER = 2'd3   // status registers shifted into the latch chains
  } phase_e;

  // Width of one signal line's TSV select: ceil(log2(N+1)), at least 1.
  function automatic int unsigned sel_width(input int unsigned n);
    return (n < 1) ? 1 : $clog2(n + 1);
  endfunction

  // Width of a counter that must hold values 0 .. x.
  function automatic int unsigned cnt_width(input int unsigned x);
    return (x < 1) ? 1 : $clog2(x + 1);
  endfunction

endpackage
