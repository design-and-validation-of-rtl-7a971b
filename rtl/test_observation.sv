// test_observation: die-2 test observation part of the detection block.
//
// One NAND gate and one capture flip-flop per TSV. The NAND takes the TSV's
// die-2 end t2 and the SI signal; with SI high its output Test_result is the
// inverse of t2, so a TSV whose rising transition has not reached the logic
// threshold by the capture edge gives Test_result = 1 (faulty), and a
// fault-free TSV gives 0. With SI low every NAND outputs 1, which
// initialises all flops to "faulty" before a test.
// cap_en selects the flops that capture on a clock: all of them during
// initialisation, only the flop of the TSV under test during the test (its
// capture edge is one clock after its launch edge). The flop of the TSV
// tested in the previous clock is read out on serial_out (chosen by
// xfer_idx) and goes to the TSV status registers of both dies.
// The NAND with SI and the capture flop follow the detection block drawing;
// the read-out multiplexer is this design's.
module test_observation #(
  parameter  int unsigned W  = 6,  // M+N TSVs in the group
  localparam int unsigned IW = tsv_ft_pkg::cnt_width(W)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          si,
  input  logic [W-1:0]  t2,
  input  logic [W-1:0]  cap_en,
  input  logic [IW-1:0] xfer_idx,
  output logic [W-1:0]  test_result,
  output logic [W-1:0]  obs,
  output logic          serial_out
);

  timeunit 1ps;
  timeprecision 1ps;

  assign test_result = ~({W{si}} & t2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) obs <= '1;
    else begin
      for (int j = 0; j < int'(W); j++) begin
        if (cap_en[j]) obs[j] <= test_result[j];
      end
    end
  end

  always_comb begin
    serial_out = 1'b1;
    for (int j = 0; j < int'(W); j++) begin
      if (xfer_idx == IW'(j)) serial_out = obs[j];
    end
  end

endmodule
