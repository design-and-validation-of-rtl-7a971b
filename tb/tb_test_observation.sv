// tb_test_observation: checks the die-2 test observation of a 6-TSV group.
// With SI low every capture flop must be set to '1' whatever t2 is; with SI
// high Test_result must be the inverse of t2, only the enabled flop may
// capture, and serial_out must present the flop chosen by xfer_idx.
module tb_test_observation;
  timeunit 1ps; timeprecision 1ps;
  localparam int W = 6;
  logic clk = 0, rst_n = 0, si = 1, serial_out;
  logic [W-1:0] t2 = '0, cap_en = '0, test_result, obs, model;
  logic [2:0] xfer_idx = '0;
  int checks = 0, failures = 0;

  test_observation #(.W(W)) dut (.*);

  always #333 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1; #1;
    for (int k = 0; k < 100; k++) begin
      // initialisation: SI low
      si = 0; cap_en = '1; t2 = W'($urandom); #1;
      check(test_result == '1, "SI low forces Test_result = 1");
      @(posedge clk); #1;
      check(obs == '1, "initialised to faulty");
      model = '1;
      si = 1;
      for (int j = 0; j < W; j++) begin
        t2 = W'($urandom); cap_en = W'(1) << j; #1;
        check(test_result == ~t2, "Test_result = NAND(SI, t2)");
        model[j] = ~t2[j];
        @(posedge clk); #1;
        check(obs == model, $sformatf("capture TSV%0d obs %b model %b", j + 1, obs, model));
      end
      cap_en = '0;
      for (int j = 0; j < W; j++) begin
        xfer_idx = 3'(j); #1;
        check(serial_out == model[j], "serial read-out");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
