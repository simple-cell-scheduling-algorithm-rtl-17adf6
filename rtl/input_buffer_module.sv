// input_buffer_module: the input side of one switch port. It holds N virtual
// output queues Q_i0..Q_i(N-1), one per output, so that a cell waiting for a
// busy output never blocks cells for other outputs (no head-of-line
// blocking).
//
// Arrival: at most one cell per cell time arrives (in_valid) with its output
// index in_dest, and is appended to Q_i[in_dest]. If that queue is full, the
// cell is refused and in_drop pulses. hol[j] tells the scheduler that Q_ij
// has a head-of-line cell.
//
// Departure: the scheduler marks at most one queue per plane, acc1 (plane 1)
// and acc2 (plane 2), both one-hot. Each marked queue sends its head cell on
// that plane's port. When the same queue is marked on both planes, it sends
// its first two cells, the first on plane 1 and the second on plane 2; if it
// holds only one cell, it sends it on plane 1 and plane 2 stays idle. The
// queue index of a departing cell is implied by the plane's crossbar setting,
// so only the cell itself leaves.
//
// Timing: one clock cycle is one cell time. p1/p2 outputs are combinational
// from acc1/acc2 and the queue heads, for the crossbar to carry in the same
// cell time; queues update on the rising edge. A cell that arrives in cell
// time t can leave in cell time t+1 at the earliest. The queue depth, the
// drop-on-full policy, the choice of plane 1 for a lone cell, and the reset
// are choices of this design; the queue organisation and the two-cell rule
// follow the algorithm.
module input_buffer_module #(
  parameter int unsigned N     = 64,
  parameter int unsigned DEPTH = 8,
  parameter int unsigned W     = 64,
  localparam int unsigned DW   = sma_pkg::idx_width(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  // arriving cells
  input  logic          in_valid,
  input  logic [DW-1:0] in_dest,
  input  logic [W-1:0]  in_cell,
  output logic          in_drop,
  // to and from the scheduler
  output logic [N-1:0]  hol,
  input  logic [N-1:0]  acc1,
  input  logic [N-1:0]  acc2,
  // to the two switching planes
  output logic          p1_valid,
  output logic [W-1:0]  p1_cell,
  output logic          p2_valid,
  output logic [W-1:0]  p2_cell
);

  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [N-1:0][1:0]        push_n, push_ok, pop_n;
  logic [N-1:0][1:0][W-1:0] head;
  logic [N-1:0][CW-1:0]     count;

  for (genvar j = 0; j < N; j++) begin : g_voq
    cell_fifo #(.DEPTH(DEPTH), .W(W)) u_q (
      .clk      (clk),
      .rst_n    (rst_n),
      .push_n   (push_n[j]),
      .push_data({in_cell, in_cell}),
      .push_ok  (push_ok[j]),
      .pop_n    (pop_n[j]),
      .head     (head[j]),
      .count    (count[j])
    );

    assign push_n[j] = {1'b0, in_valid && (in_dest == DW'(j))};
    assign hol[j]    = (count[j] != '0);

    // A queue matched on both planes sends two cells if it has two.
    always_comb begin
      if (acc1[j] && acc2[j])
        pop_n[j] = (count[j] >= CW'(2)) ? 2'd2 : 2'd1;
      else
        pop_n[j] = {1'b0, acc1[j] | acc2[j]};
    end
  end

  // in_drop: the addressed queue had no room.
  always_comb begin
    in_drop = 1'b0;
    for (int unsigned j = 0; j < N; j++)
      if (push_n[j] != 2'd0 && push_ok[j] == 2'd0) in_drop = 1'b1;
  end

  // Plane outputs: one-hot selection of the matched queue's head.
  always_comb begin
    p1_valid = 1'b0;
    p1_cell  = '0;
    p2_valid = 1'b0;
    p2_cell  = '0;
    for (int unsigned j = 0; j < N; j++) begin
      if (acc1[j]) begin
        p1_valid = 1'b1;
        p1_cell  = p1_cell | head[j][0];
      end
      if (acc2[j]) begin
        if (!acc1[j]) begin
          p2_valid = 1'b1;
          p2_cell  = p2_cell | head[j][0];
        end else if (pop_n[j] == 2'd2) begin
          p2_valid = 1'b1;
          p2_cell  = p2_cell | head[j][1];
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(acc1) && $onehot0(acc2));
  assert property (@(posedge clk) disable iff (!rst_n) ((acc1 | acc2) & ~hol) == '0);

endmodule
