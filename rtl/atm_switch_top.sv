// atm_switch_top: an N x N input and output buffered cell switch with two
// space-division switching planes, scheduled by the simple matching
// algorithm (SMA).
//
// Structure: N input buffer modules, each with N virtual output queues; the
// SMA scheduler, which in every cell time runs one request-grant-accept pass
// on each plane independently; two N x N switching planes (crossbars), each
// set by its plane's match; N output buffer modules, each taking up to two
// cells per cell time and sending one. The two planes give a speedup of two
// with every plane running at the port rate, and the pointer offsets of the
// scheduler bound the head-of-line wait of any queue to N/2 cell times.
//
// Interface, per port p: in_valid/in_dest/in_cell offer one cell per cell
// time for output in_dest (0-based); in_drop pulses when the addressed
// virtual output queue is full. out_valid/out_cell give one cell per cell
// time; out_drop counts cells (0..2) refused by a full output queue.
//
// Timing: one clock cycle is one cell time; synchronous active-low reset.
// A cell accepted in cycle t is matched at the earliest in cycle t+1, passes
// a plane in that cycle and appears on its output in cycle t+2 when the
// output queue is otherwise empty. Cell width, queue depths, loss on full
// queues and reset are choices of this design (see the README); N = 64
// matches the switch size the algorithm was evaluated at.
module atm_switch_top #(
  parameter int unsigned N           = 64,
  parameter int unsigned W           = 64,
  parameter int unsigned VOQ_DEPTH   = 8,
  parameter int unsigned OBUF_DEPTH  = 256,
  parameter int unsigned PLANE2_BASE = N / 2,
  localparam int unsigned DW         = sma_pkg::idx_width(N)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [N-1:0]          in_valid,
  input  logic [N-1:0][DW-1:0]  in_dest,
  input  logic [N-1:0][W-1:0]   in_cell,
  output logic [N-1:0]          in_drop,
  output logic [N-1:0]          out_valid,
  output logic [N-1:0][W-1:0]   out_cell,
  output logic [N-1:0][1:0]     out_drop
);

  logic [N-1:0][N-1:0]  hol;                // [i][j]: Q_ij not empty
  logic [N-1:0][N-1:0]  grant1, grant2;
  logic [N-1:0][N-1:0]  accept1, accept2;   // [i][j]: Q_ij matched on plane k
  logic [N-1:0][DW-1:0] gptr1, aptr1, gptr2, aptr2;
  logic [N-1:0]         p1_valid, p2_valid;
  logic [N-1:0][W-1:0]  p1_cell, p2_cell;
  logic [N-1:0]         x1_valid, x2_valid;
  logic [N-1:0][W-1:0]  x1_cell, x2_cell;

  for (genvar i = 0; i < N; i++) begin : g_in
    input_buffer_module #(.N(N), .DEPTH(VOQ_DEPTH), .W(W)) u_ibm (
      .clk     (clk),
      .rst_n   (rst_n),
      .in_valid(in_valid[i]),
      .in_dest (in_dest[i]),
      .in_cell (in_cell[i]),
      .in_drop (in_drop[i]),
      .hol     (hol[i]),
      .acc1    (accept1[i]),
      .acc2    (accept2[i]),
      .p1_valid(p1_valid[i]),
      .p1_cell (p1_cell[i]),
      .p2_valid(p2_valid[i]),
      .p2_cell (p2_cell[i])
    );
  end

  sma_scheduler #(.N(N), .PLANE2_BASE(PLANE2_BASE)) u_sched (
    .clk    (clk),
    .rst_n  (rst_n),
    .req    (hol),
    .grant1 (grant1),
    .grant2 (grant2),
    .accept1(accept1),
    .accept2(accept2),
    .gptr1  (gptr1),
    .aptr1  (aptr1),
    .gptr2  (gptr2),
    .aptr2  (aptr2)
  );

  switching_plane #(.N(N), .W(W)) u_plane1 (
    .cfg      (accept1),
    .in_valid (p1_valid),
    .in_cell  (p1_cell),
    .out_valid(x1_valid),
    .out_cell (x1_cell)
  );

  switching_plane #(.N(N), .W(W)) u_plane2 (
    .cfg      (accept2),
    .in_valid (p2_valid),
    .in_cell  (p2_cell),
    .out_valid(x2_valid),
    .out_cell (x2_cell)
  );

  for (genvar j = 0; j < N; j++) begin : g_out
    output_buffer_module #(.DEPTH(OBUF_DEPTH), .W(W)) u_obm (
      .clk      (clk),
      .rst_n    (rst_n),
      .c1_valid (x1_valid[j]),
      .c1_cell  (x1_cell[j]),
      .c2_valid (x2_valid[j]),
      .c2_cell  (x2_cell[j]),
      .drop_n   (out_drop[j]),
      .out_valid(out_valid[j]),
      .out_cell (out_cell[j])
    );
  end

endmodule
