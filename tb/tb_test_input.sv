// tb_test_input: checks the die-1 input signal unit of a 4:2 group, through
// a routing demultiplexer so that the effect on the TSVs is visible.
// Normal phases must pass functional lines and selects; INIT must drive
// every TSV low; TEST with index j must drive TSV j, and only TSV j, high
// (a rising transition from the low level of the clock before), and index
// M+N must drive all TSVs low.
module tb_test_input;
  timeunit 1ps; timeprecision 1ps;
  import tsv_ft_pkg::*;
  localparam int M = 4, N = 2, W = 6, K = 2;
  phase_e phase;
  logic [2:0] test_idx;
  logic [M-1:0] func_sig, line_sig;
  logic [M-1:0][K-1:0] func_sel, line_sel;
  logic [W-1:0] tsv;
  int checks = 0, failures = 0;

  test_input #(.M(M), .N(N)) dut (.*);
  routing_demux #(.M(M), .N(N)) u_demux (.sig(line_sig), .sel(line_sel), .tsv(tsv));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int k = 0; k < 50; k++) begin
      func_sig = M'($urandom); func_sel = (M*K)'($urandom); test_idx = 3'($urandom);
      phase = (k % 2) ? PH_IDLE : PH_RECOVER; #1;
      check(line_sig == func_sig && line_sel == func_sel, "normal phase passes lines");
      phase = PH_INIT; #1;
      check(tsv == '0, "INIT drives all TSVs low");
      phase = PH_TEST;
      for (int j = 0; j <= W; j++) begin
        test_idx = 3'(j); #1;
        check(tsv == ((j < W) ? (W'(1) << j) : W'(0)), $sformatf("TEST idx %0d tsv %b", j, tsv));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
