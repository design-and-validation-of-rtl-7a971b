// tb_latch_chain: checks the select latch chain of a 4:2 group.
// Replays the scan sequence of the reconfiguration example (values 00, 01,
// 10, 10 scanned on clocks 1, 3, 5, 6) and checks the chain after every
// clock against the printed per-cycle contents, then random scans against a
// queue model.
module tb_latch_chain;
  timeunit 1ps; timeprecision 1ps;
  localparam int M = 4, N = 2, K = 2;
  logic clk = 0, rst_n = 0, en = 0;
  logic [K-1:0] din = '0;
  logic [M-1:0][K-1:0] sel, model;
  int checks = 0, failures = 0;

  latch_chain #(.M(M), .N(N)) dut (.*);

  always #333 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic step(input logic e, input logic [K-1:0] d);
    en = e; din = d; @(posedge clk); #1; en = 0;
    if (e) begin
      for (int i = 0; i < M - 1; i++) model[i] = model[i+1];
      model[M-1] = d;
    end
  endtask

  // expected chain S1..S4 after clocks 1..6 of the example
  logic [1:0] exp_chain [6][4] = '{
    '{2'b00, 2'b00, 2'b00, 2'b00}, '{2'b00, 2'b00, 2'b00, 2'b00},
    '{2'b00, 2'b00, 2'b00, 2'b01}, '{2'b00, 2'b00, 2'b00, 2'b01},
    '{2'b00, 2'b00, 2'b01, 2'b10}, '{2'b00, 2'b01, 2'b10, 2'b10}};
  logic       ex_en  [6] = '{1, 0, 1, 0, 1, 1};
  logic [1:0] ex_din [6] = '{2'b00, 2'b01, 2'b01, 2'b10, 2'b10, 2'b10};

  initial begin
    model = '0;
    repeat (2) @(posedge clk); rst_n = 1; #1;
    check(sel == '0, "reset");
    for (int c = 0; c < 6; c++) begin
      step(ex_en[c], ex_din[c]);
      for (int i = 0; i < M; i++)
        check(sel[i] == exp_chain[c][i], $sformatf("cycle %0d S%0d=%b", c + 1, i + 1, sel[i]));
    end
    for (int k = 0; k < 200; k++) begin
      step(1'($urandom), K'($urandom));
      check(sel == model, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
