// cell_fifo: a first-in first-out cell queue that can take up to two cells
// and give up to two cells in the same clock cycle.
//
// It serves as a virtual output queue Q_ij of an input buffer module (one
// arrival, up to two departures per cell time, one through each switching
// plane) and as the queue of an output buffer module (up to two arrivals, one
// from each plane, and one departure per cell time).
//
// Interface. push_n (0..2) cells are offered on push_data[0] (older) and
// push_data[1]. The queue stores as many as fit after this cycle's pops and
// reports that number on push_ok, combinationally; the rest are refused and
// the caller counts them as lost. pop_n (0..2, never above count) cells leave
// from head[0] (oldest) and head[1]. head[1] is meaningful when count >= 2.
// Timing: writes, reads and count update on the rising clock edge; head and
// count are register outputs. Synchronous active-low reset empties the queue.
// DEPTH must be a power of two. The two-port structure and the
// refuse-on-full behaviour are choices of this design.
module cell_fifo #(
  parameter int unsigned DEPTH = 8,
  parameter int unsigned W     = 64,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [1:0]         push_n,
  input  logic [1:0][W-1:0]  push_data,
  output logic [1:0]         push_ok,
  input  logic [1:0]         pop_n,
  output logic [1:0][W-1:0]  head,
  output logic [CW-1:0]      count
);

  initial assert (DEPTH >= 2 && (DEPTH & (DEPTH - 1)) == 0)
    else $error("DEPTH must be a power of two, at least 2");

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] rd_ptr, wr_ptr;
  logic [CW:0]   space;

  // Room after this cycle's departures.
  assign space = (CW + 1)'(DEPTH) - (CW + 1)'(count) + (CW + 1)'(pop_n);

  always_comb begin
    if ((CW + 1)'(push_n) <= space) push_ok = push_n;
    else                            push_ok = space[1:0];
  end

  assign head[0] = mem[rd_ptr];
  assign head[1] = mem[rd_ptr + AW'(1)];

  always_ff @(posedge clk) begin
    if (push_ok != 2'd0) mem[wr_ptr]          <= push_data[0];
    if (push_ok == 2'd2) mem[wr_ptr + AW'(1)] <= push_data[1];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      rd_ptr <= rd_ptr + AW'(pop_n);
      wr_ptr <= wr_ptr + AW'(push_ok);
      count  <= count + CW'(push_ok) - CW'(pop_n);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) pop_n <= 2'd2 && CW'(pop_n) <= count);
  assert property (@(posedge clk) disable iff (!rst_n) push_n <= 2'd2);

endmodule
