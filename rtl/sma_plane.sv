// sma_plane: the SMA scheduler of one switching plane, a single-iteration
// request-grant-accept matcher between N input buffer modules and N output
// buffer modules.
//
// Step 1, request: every non-empty virtual output queue Q_ij (req[i][j] = 1)
// requests output j. Step 2, grant: the grant round-robin pointer G_j of this
// plane grants the requesting input nearest to (at or after) its pointer.
// Step 3, accept: the accept round-robin pointer A_i of this plane accepts the
// granting output nearest to its pointer. accept[i][j] = 1 means Q_ij sends
// its head-of-line cell through this plane in this cell time. The three steps
// run once per cell time, in one combinational pass, with no iteration.
//
// Pointers start at (INIT_BASE-1-idx) mod N (0-based), so that A_i and G_j
// point at each other whenever (i + j) mod N takes a plane-specific value:
// such a pair is always matched if Q_ij is non-empty. INIT_BASE is N for
// plane 1 and N/2 for plane 2. All pointers advance by one at every clock
// edge (one clock cycle is one cell time), regardless of the match.
//
// Interface: req, grant and accept are N x N matrices indexed [input][output].
// gptr[j] and aptr[i] show the pointers (0-based). Timing: grant and accept
// are combinational in req and the pointer registers; pointers change on the
// clock edge that ends a cell time.
module sma_plane #(
  parameter int unsigned N         = 64,
  parameter int unsigned INIT_BASE = N,
  localparam int unsigned PW       = sma_pkg::idx_width(N)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [N-1:0][N-1:0]   req,     // [i][j]: Q_ij has a head-of-line cell
  output logic [N-1:0][N-1:0]   grant,   // [i][j]: G_j granted input i
  output logic [N-1:0][N-1:0]   accept,  // [i][j]: A_i accepted G_j
  output logic [N-1:0][PW-1:0]  gptr,    // GRP pointer of output j
  output logic [N-1:0][PW-1:0]  aptr     // ARP pointer of input i
);

  // Column j of req feeds G_j; row i of grant feeds A_i.
  logic [N-1:0][N-1:0] req_t;    // [j][i]
  logic [N-1:0][N-1:0] grant_t;  // [j][i]

  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_col
      assign req_t[j][i] = req[i][j];
      assign grant[i][j] = grant_t[j][i];
    end
  end

  for (genvar j = 0; j < N; j++) begin : g_grp
    sma_rr_arbiter #(
      .N   (N),
      .INIT(sma_pkg::init_pointer(INIT_BASE, j, N))
    ) u_grp (
      .clk      (clk),
      .rst_n    (rst_n),
      .req      (req_t[j]),
      .gnt      (grant_t[j]),
      .ptr      (gptr[j])
    );
  end

  for (genvar i = 0; i < N; i++) begin : g_arp
    sma_rr_arbiter #(
      .N   (N),
      .INIT(sma_pkg::init_pointer(INIT_BASE, i, N))
    ) u_arp (
      .clk      (clk),
      .rst_n    (rst_n),
      .req      (grant[i]),
      .gnt      (accept[i]),
      .ptr      (aptr[i])
    );
  end

endmodule
