// tb_atm_switch_full: end-to-end run of atm_switch_top at its default size
// (64 ports, 64-bit cells, virtual output queues of 8 cells, output queues of
// 256 cells): Bernoulli traffic with uniform destinations at loads 0.6, 0.7,
// 0.8, 0.85, 0.9, 0.95 and 0.99, 2000 cell times each, printing the mean and
// variance of the cell delay at each load; then a hot spot on output 0 that
// fills the queues, and a drain. Stimulus and checks are in atm_switch_env.
module tb_atm_switch_full;
  localparam int N = 64, W = 64;
  localparam int DW = $clog2(N);

  logic clk = 0, rst_n;
  always #5 clk = ~clk;

  logic [N-1:0]         in_valid, in_drop, out_valid;
  logic [N-1:0][DW-1:0] in_dest;
  logic [N-1:0][W-1:0]  in_cell, out_cell;
  logic [N-1:0][1:0]    out_drop;

  atm_switch_top dut (.*);

  atm_switch_env #(.N(N), .W(W), .VOQ_DEPTH(8), .OBUF_DEPTH(256),
                   .NLOADS(7), .LOAD_PM('{600, 700, 800, 850, 900, 950, 990, 0}),
                   .LOAD_CYC(2000), .HOT_CYC(300)) env (
    .clk, .rst_n, .in_valid, .in_dest, .in_cell, .in_drop, .out_valid, .out_cell, .out_drop,
    .hol(dut.hol), .accept1(dut.accept1), .accept2(dut.accept2),
    .x1_valid(dut.x1_valid), .x1_cell(dut.x1_cell), .x2_valid(dut.x2_valid), .x2_cell(dut.x2_cell));
endmodule
