// tb_routing_demux: checks the die-1 demultiplexers of a 4:2 group.
// Applies the example selects (00, 01, 10, 10: lines to TSV1, TSV3, TSV5,
// TSV6) and all one-hot line patterns, then random valid select sets
// (each line on a distinct TSV, as the recovery block produces them) and
// compares every TSV with a model that routes line i to TSV i+sel[i].
module tb_routing_demux;
  timeunit 1ps; timeprecision 1ps;
  localparam int M = 4, N = 2, W = 6, K = 2;
  logic [M-1:0] sig;
  logic [M-1:0][K-1:0] sel;
  logic [W-1:0] tsv;
  int checks = 0, failures = 0;

  routing_demux #(.M(M), .N(N)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [W-1:0] model(input logic [M-1:0] s, input logic [M-1:0][K-1:0] se);
    logic [W-1:0] t = '0;
    for (int i = 0; i < M; i++) if (int'(se[i]) <= N) t[i + int'(se[i])] = s[i];
    return t;
  endfunction

  // random valid selects: choose W-M faulty TSVs, map lines to the others
  function automatic logic [M-1:0][K-1:0] rand_sel();
    logic [W-1:0] faulty = '0;
    logic [M-1:0][K-1:0] r;
    int nf = $urandom % (N + 1), g = 0;
    for (int e = 0; e < nf; e++) faulty[$urandom % W] = 1'b1;
    for (int j = 0; j < W && g < M; j++) if (!faulty[j]) begin
      r[g] = K'(j - g); g++;
    end
    for (; g < M; g++) r[g] = K'(0);
    return r;
  endfunction

  initial begin
    sel = '{2'b10, 2'b10, 2'b01, 2'b00};  // S4..S1
    for (int i = 0; i < M; i++) begin
      sig = M'(1) << i; #1;
      check(tsv == model(sig, sel), $sformatf("example line %0d -> %b", i + 1, tsv));
    end
    sig = 4'b1111; #1;
    check(tsv == 6'b110101, $sformatf("example all lines: TSV1,3,5,6 used, got %b", tsv));
    for (int k = 0; k < 500; k++) begin
      sel = rand_sel(); sig = M'($urandom); #1;
      check(tsv == model(sig, sel), "random");
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
