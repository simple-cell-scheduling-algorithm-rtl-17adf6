// sma_scheduler: the complete SMA cell scheduler of the dual-plane switch.
//
// Two sma_plane instances run the same request-grant-accept algorithm in
// parallel and independently, on the same head-of-line status. Plane 1's
// pointers start at N-(idx-1) (1-based), plane 2's at PLANE2_BASE-(idx-1),
// modulo N, with PLANE2_BASE = N/2. The half-N offset between the two planes
// makes every pair (i, j) the mutual top priority of one of the planes once
// every N/2 cell times, so any head-of-line cell is sent within N/2 cell
// times. Another PLANE2_BASE (3N/4 for instance) still works, with a looser
// guarantee.
//
// Because the planes do not coordinate, Q_ij may be accepted on both planes
// in one cell time; the input buffer module then sends two cells, or one if
// Q_ij holds a single cell.
//
// Interface: req[i][j] is the head-of-line status; grant1/grant2 are the
// per-plane grants; accept1 and accept2 are the
// per-plane matches [input][output]; they also set the crossbar of each
// plane. Timing: accepts are combinational within the cell time; pointers
// advance on every clock edge; one clock cycle is one cell time.
module sma_scheduler #(
  parameter int unsigned N           = 64,
  parameter int unsigned PLANE2_BASE = N / 2,
  localparam int unsigned PW         = sma_pkg::idx_width(N)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0][N-1:0]  req,
  output logic [N-1:0][N-1:0]  grant1,   // [i][j]: plane-1 grant of G_j to input i
  output logic [N-1:0][N-1:0]  grant2,
  output logic [N-1:0][N-1:0]  accept1,  // [i][j]: plane-1 match of Q_ij
  output logic [N-1:0][N-1:0]  accept2,
  output logic [N-1:0][PW-1:0] gptr1,
  output logic [N-1:0][PW-1:0] aptr1,
  output logic [N-1:0][PW-1:0] gptr2,
  output logic [N-1:0][PW-1:0] aptr2
);

  sma_plane #(.N(N), .INIT_BASE(N)) u_plane1 (
    .clk      (clk),
    .rst_n    (rst_n),
    .req      (req),
    .grant    (grant1),
    .accept   (accept1),
    .gptr     (gptr1),
    .aptr     (aptr1)
  );

  sma_plane #(.N(N), .INIT_BASE(PLANE2_BASE)) u_plane2 (
    .clk      (clk),
    .rst_n    (rst_n),
    .req      (req),
    .grant    (grant2),
    .accept   (accept2),
    .gptr     (gptr2),
    .aptr     (aptr2)
  );

endmodule
