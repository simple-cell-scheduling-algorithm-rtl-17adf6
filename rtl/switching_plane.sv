// switching_plane: one N x N space-division switching plane (a crossbar).
// The switch has two of them, which together give every input and output
// buffer module two cell transfers per cell time (a speedup of two) while
// each plane runs at the port rate.
//
// The plane is configured in every cell time by its scheduler plane's match
// matrix: cfg[i][j] = 1 connects input i to output j. A valid match has at
// most one 1 in each row and each column. Output j carries the cell of the
// input connected to it, and out_valid[j] is set when that input has a cell
// to send on this plane.
//
// Timing: purely combinational; the cell is written into the output buffer
// module at the end of the cell time. The AND-OR crossbar structure is a
// choice of this design; only the plane's function and size are given.
module switching_plane #(
  parameter int unsigned N = 64,
  parameter int unsigned W = 64
) (
  input  logic [N-1:0][N-1:0] cfg,       // [i][j]: connect input i to output j
  input  logic [N-1:0]        in_valid,
  input  logic [N-1:0][W-1:0] in_cell,
  output logic [N-1:0]        out_valid,
  output logic [N-1:0][W-1:0] out_cell
);

  for (genvar j = 0; j < N; j++) begin : g_out
    always_comb begin
      out_valid[j] = 1'b0;
      out_cell[j]  = '0;
      for (int unsigned i = 0; i < N; i++)
        if (cfg[i][j] && in_valid[i]) begin
          out_valid[j] = 1'b1;
          out_cell[j]  = out_cell[j] | in_cell[i];
        end
    end
  end

endmodule
