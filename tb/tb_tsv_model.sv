// tb_tsv_model: checks the behavioural TSV against the characterised delays.
// Twelve TSV instances with different defects are driven together; the time
// at which each far end crosses is measured for a rising and a falling edge
// and compared with the characterisation points (tolerance 1 ps), including
// one interpolated point. Stuck cases (full open, strong short) must never
// rise. Finally the classification at a 1.5 GHz capture (667 ps) must match:
// open 4 kOhm and below and short 2 kOhm and above pass, open 5 kOhm and
// short 1 kOhm fail.
module tb_tsv_model;
  timeunit 1ps; timeprecision 1ps;
  import tsv_ft_pkg::*;
  localparam int NT = 12;
  localparam tsv_defect_e KIND [NT] = '{DEF_NONE, DEF_OPEN, DEF_OPEN, DEF_OPEN, DEF_OPEN, DEF_OPEN,
                                         DEF_OPEN, DEF_SHORT, DEF_SHORT, DEF_SHORT, DEF_SHORT, DEF_OPEN};
  localparam int ROHM [NT] = '{0, 4000, 5000, 10000, 2500, 1000000,
                               3000, 2000, 1000, 500, 1000000, 100000};
  localparam int EXP_RISE [NT] = '{242, 667, 805, 1492, 480, -1, 541, 665, 758, -1, 242, 14121};
  localparam int EXP_FALL [NT] = '{160, 608, 743, 1441, 404, -1, 469, 160, 160, -1, 160, 14030};

  logic t1 = 0;
  tsv_defect_t defect [NT];
  logic [NT-1:0] t2;
  time rise_at [NT], fall_at [NT];
  int checks = 0, failures = 0;

  for (genvar i = 0; i < NT; i++) begin : g
    tsv_model u (.t1(t1), .defect(defect[i]), .t2(t2[i]));
    always @(posedge t2[i]) rise_at[i] = $time;
    always @(negedge t2[i]) fall_at[i] = $time;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic bit near(input time t, input int e);
    return (t >= time'(e - 1)) && (t <= time'(e + 1));
  endfunction

  initial begin
    for (int i = 0; i < NT; i++) begin
      defect[i].kind = KIND[i]; defect[i].r_ohm = 32'(ROHM[i]);
      rise_at[i] = 0; fall_at[i] = 0;
    end
    #20000;
    check(t2 == '0, "all low after reset");
    t1 = 1;
    #667;   // 1.5 GHz capture edge
    for (int i = 0; i < NT; i++) begin
      automatic bit pass_exp = (EXP_RISE[i] >= 0) && (EXP_RISE[i] < 667);
      if (i == 1) continue;  // 667 ps: exactly at the capture edge
      check(t2[i] == pass_exp, $sformatf("capture class TSV %0d: %b", i, t2[i]));
    end
    #30000;
    for (int i = 0; i < NT; i++) begin
      if (EXP_RISE[i] < 0) check(t2[i] == 1'b0, $sformatf("stuck TSV %0d never rises", i));
      else check(near(rise_at[i] - 20000, EXP_RISE[i]),
                 $sformatf("rise TSV %0d: %0t expected %0d", i, rise_at[i] - 20000, EXP_RISE[i]));
    end
    t1 = 0;
    #30000;
    for (int i = 0; i < NT; i++)
      if (EXP_FALL[i] >= 0)
        check(near(fall_at[i] - 50667, EXP_FALL[i]),
              $sformatf("fall TSV %0d: %0t expected %0d", i, fall_at[i] - 50667, EXP_FALL[i]));
    // a full open freezes the far end: raise it on a healthy TSV first
    defect[0].kind = DEF_NONE; t1 = 1; #1000;
    defect[0].kind = DEF_OPEN; defect[0].r_ohm = 32'd2000000; t1 = 0; #20000;
    check(t2[0] == 1'b1, "full open holds the old level");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
