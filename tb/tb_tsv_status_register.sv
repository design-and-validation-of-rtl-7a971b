// tb_tsv_status_register: checks the TSV status shift register.
// Loads the 4:2 example word '010100' serially (TSV1 first), checks it
// reads in TSV order, that one recovery shift gives '101000' with the MSB as
// serial output, then compares random shift sequences with a model word.
module tb_tsv_status_register;
  timeunit 1ps; timeprecision 1ps;
  localparam int W = 6;
  logic clk = 0, rst_n = 0, shift_en = 0, sin = 0, sout;
  logic [W-1:0] q, model;
  int checks = 0, failures = 0;

  tsv_status_register #(.W(W)) dut (.*);

  always #333 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic shift(input logic b);
    shift_en = 1; sin = b; @(posedge clk); #1; shift_en = 0;
    model = {model[W-2:0], b};
  endtask

  initial begin
    model = '0;
    repeat (2) @(posedge clk); rst_n = 1; #1;
    check(q == '0, "reset value");
    begin
      automatic logic [W-1:0] w = 6'b010100;
      for (int j = W - 1; j >= 0; j--) shift(w[j]);
      check(q == 6'b010100, $sformatf("loaded %b", q));
      check(sout == 1'b0, "sout is TSV1");
      shift(1'b0);
      check(q == 6'b101000, $sformatf("after one shift %b", q));
      check(sout == 1'b1, "sout is TSV2");
    end
    for (int k = 0; k < 200; k++) begin
      automatic logic b = 1'($urandom);
      if ($urandom % 4 == 0) begin
        @(posedge clk); #1;   // idle clock: hold
      end else shift(b);
      check(q == model, $sformatf("random q %b model %b", q, model));
      check(sout == model[W-1], "random sout");
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
