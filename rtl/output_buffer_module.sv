// output_buffer_module: the output side of one switch port. With two
// switching planes, up to two cells for this output arrive in one cell time,
// while the output line takes one cell per cell time, so the module queues
// them.
//
// Arrival: c1 (from plane 1) and c2 (from plane 2). When both arrive in the
// same cell time, the plane-1 cell is queued first; this keeps the order of
// two cells that one input queue sent together over both planes. Cells that
// do not fit are refused; drop_n counts them (0..2) in that cell time.
//
// Departure: whenever the queue is not empty, out_valid is high and out_cell
// is the oldest cell; it leaves at the end of the cell time. A cell written at
// the end of cell time t appears on out_cell in cell time t+1.
//
// Timing: one clock cycle is one cell time. The single FIFO, its depth and
// the drop-on-full policy are choices of this design; the two-cells-in,
// one-cell-out rate follows the switch architecture.
module output_buffer_module #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned W     = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         c1_valid,
  input  logic [W-1:0] c1_cell,
  input  logic         c2_valid,
  input  logic [W-1:0] c2_cell,
  output logic [1:0]   drop_n,
  output logic         out_valid,
  output logic [W-1:0] out_cell
);

  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [1:0]        push_n, push_ok, pop_n;
  logic [1:0][W-1:0] push_data, head;
  logic [CW-1:0]     count;

  // Pack the arrivals, plane 1 first.
  always_comb begin
    push_n    = 2'(c1_valid) + 2'(c2_valid);
    push_data = '0;
    if (c1_valid) begin
      push_data[0] = c1_cell;
      push_data[1] = c2_cell;
    end else begin
      push_data[0] = c2_cell;
    end
  end

  assign pop_n     = {1'b0, out_valid};
  assign out_valid = (count != '0);
  assign out_cell  = head[0];
  assign drop_n    = push_n - push_ok;

  cell_fifo #(.DEPTH(DEPTH), .W(W)) u_q (
    .clk      (clk),
    .rst_n    (rst_n),
    .push_n   (push_n),
    .push_data(push_data),
    .push_ok  (push_ok),
    .pop_n    (pop_n),
    .head     (head),
    .count    (count)
  );

endmodule
