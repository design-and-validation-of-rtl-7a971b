// tb_recovery_block: checks one die's recovery block end to end.
// Loads the status word serially as the test phase does, runs M+N recovery
// clocks and compares the selects with a model that gives signal line i the
// i-th fault-free TSV. Runs the 4:2 example '010100' (expected selects 00,
// 01, 10, 10 after six clocks), random 4:2 words, and random words for a
// 50:5 group.
module tb_recovery_block;
  timeunit 1ps; timeprecision 1ps;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  always #333 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---- 4:2 ----
  logic a_load = 0, a_bit = 0, a_clear = 0, a_rec = 0;
  logic [3:0][1:0] a_sel;
  logic [5:0] a_status;
  logic [2:0] a_lc, a_fc;
  logic a_done, a_exc;
  recovery_block #(.M(4), .N(2)) dut_a (
    .clk(clk), .rst_n(rst_n), .load_en(a_load), .load_bit(a_bit), .clear(a_clear),
    .recover_en(a_rec), .sel(a_sel), .status(a_status), .line_count(a_lc),
    .faulty_count(a_fc), .lines_done(a_done), .exceed(a_exc));

  // ---- 50:5 ----
  logic b_load = 0, b_bit = 0, b_clear = 0, b_rec = 0;
  logic [49:0][2:0] b_sel;
  logic [54:0] b_status;
  logic [5:0] b_lc, b_fc;
  logic b_done, b_exc;
  recovery_block #(.M(50), .N(5)) dut_b (
    .clk(clk), .rst_n(rst_n), .load_en(b_load), .load_bit(b_bit), .clear(b_clear),
    .recover_en(b_rec), .sel(b_sel), .status(b_status), .line_count(b_lc),
    .faulty_count(b_fc), .lines_done(b_done), .exceed(b_exc));

  // expected select of line i: (index of i-th fault-free TSV) - i
  function automatic int exp_sel(input logic [63:0] faulty, input int w, input int i);
    int good = 0;
    for (int j = 0; j < w; j++) if (!faulty[j]) begin
      if (good == i) return j - i;
      good++;
    end
    return -1;
  endfunction

  task automatic run_a(input logic [5:0] faulty_tsv);  // bit j = TSV j+1
    int nf = $countones(faulty_tsv);
    a_clear = 1; @(posedge clk); #1; a_clear = 0;
    for (int j = 0; j < 6; j++) begin
      a_load = 1; a_bit = faulty_tsv[j]; @(posedge clk); #1;
    end
    a_load = 0;
    for (int j = 0; j < 6; j++) check(a_status[5-j] == faulty_tsv[j], "4:2 status order");
    a_rec = 1; repeat (6) @(posedge clk); #1; a_rec = 0;
    check(a_exc == (nf > 2), $sformatf("4:2 exceed faults=%0d", nf));
    if (nf <= 2) begin
      check(a_done, "4:2 all lines configured");
      for (int i = 0; i < 4; i++)
        check(int'(a_sel[i]) == exp_sel(64'(faulty_tsv), 6, i), $sformatf("4:2 %b line %0d sel %0d", faulty_tsv, i, a_sel[i]));
    end
  endtask

  task automatic run_b(input logic [54:0] faulty_tsv);
    int nf = $countones(faulty_tsv);
    b_clear = 1; @(posedge clk); #1; b_clear = 0;
    for (int j = 0; j < 55; j++) begin
      b_load = 1; b_bit = faulty_tsv[j]; @(posedge clk); #1;
    end
    b_load = 0;
    b_rec = 1; repeat (55) @(posedge clk); #1; b_rec = 0;
    check(b_exc == (nf > 5), $sformatf("50:5 exceed faults=%0d", nf));
    if (nf <= 5)
      for (int i = 0; i < 50; i++)
        check(int'(b_sel[i]) == exp_sel(64'(faulty_tsv), 55, i), $sformatf("50:5 line %0d", i));
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1; #1;
    // example: TSV2 and TSV4 faulty, status printed as 010100
    run_a(6'b001010);
    check(a_sel[0] == 2'b00 && a_sel[1] == 2'b01 && a_sel[2] == 2'b10 && a_sel[3] == 2'b10,
          "example selects 00 01 10 10");
    for (int k = 0; k < 60; k++) run_a(6'($urandom));
    for (int k = 0; k < 20; k++) begin
      automatic logic [54:0] f = '0;
      automatic int nf = $urandom % 7;
      for (int e = 0; e < nf; e++) f[$urandom % 55] = 1'b1;
      run_b(f);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
