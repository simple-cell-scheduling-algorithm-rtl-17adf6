// tb_atm_switch_top: end-to-end test of the dual-plane switch at a reduced
// size (8 ports, virtual output queues of 4 cells, output queues of 8 cells)
// so that every mechanism happens often: Bernoulli traffic at loads 0.6 and
// 0.9, a hot spot that overflows queues, then a drain. Stimulus and checks are
// in atm_switch_env.
module tb_atm_switch_top;
  localparam int N = 8, W = 64, VD = 4, OD = 8;
  localparam int DW = $clog2(N);

  logic clk = 0, rst_n;
  always #5 clk = ~clk;

  logic [N-1:0]         in_valid, in_drop, out_valid;
  logic [N-1:0][DW-1:0] in_dest;
  logic [N-1:0][W-1:0]  in_cell, out_cell;
  logic [N-1:0][1:0]    out_drop;

  atm_switch_top #(.N(N), .W(W), .VOQ_DEPTH(VD), .OBUF_DEPTH(OD)) dut (.*);

  atm_switch_env #(.N(N), .W(W), .VOQ_DEPTH(VD), .OBUF_DEPTH(OD),
                   .NLOADS(2), .LOAD_PM('{600, 900, 0, 0, 0, 0, 0, 0}), .LOAD_CYC(1000), .HOT_CYC(100)) env (
    .clk, .rst_n, .in_valid, .in_dest, .in_cell, .in_drop, .out_valid, .out_cell, .out_drop,
    .hol(dut.hol), .accept1(dut.accept1), .accept2(dut.accept2),
    .x1_valid(dut.x1_valid), .x1_cell(dut.x1_cell), .x2_valid(dut.x2_valid), .x2_cell(dut.x2_cell));
endmodule
