// tb_routing_mux: checks the die-2 multiplexers of a 4:2 group.
// With the example selects (00, 01, 10, 10) output lines 1..4 must follow
// TSV1, TSV3, TSV5 and TSV6; then random TSV values and every select
// combination are compared with out[i] = tsv[i+sel[i]].
module tb_routing_mux;
  timeunit 1ps; timeprecision 1ps;
  localparam int M = 4, N = 2, W = 6, K = 2;
  logic [W-1:0] tsv;
  logic [M-1:0][K-1:0] sel;
  logic [M-1:0] sig;
  int checks = 0, failures = 0;

  routing_mux #(.M(M), .N(N)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    sel = '{2'b10, 2'b10, 2'b01, 2'b00};
    for (int j = 0; j < W; j++) begin
      tsv = W'(1) << j; #1;
      check(sig == ((j == 0) ? 4'b0001 : (j == 2) ? 4'b0010 : (j == 4) ? 4'b0100 :
                    (j == 5) ? 4'b1000 : 4'b0000), $sformatf("example TSV%0d -> %b", j + 1, sig));
    end
    for (int k = 0; k < 500; k++) begin
      tsv = W'($urandom);
      for (int i = 0; i < M; i++) sel[i] = K'($urandom % (N + 1));
      #1;
      for (int i = 0; i < M; i++)
        check(sig[i] == tsv[i + int'(sel[i])], $sformatf("random line %0d", i));
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
