// sma_rr_arbiter: one round-robin pointer of the SMA scheduler, used both as a
// grant round-robin pointer (GRP, one per output and plane) and as an accept
// round-robin pointer (ARP, one per input and plane).
//
// Function. The pointer ptr names the highest-priority element. The arbiter
// scans req[ptr], req[ptr+1], ..., req[N-1], req[0], ..., req[ptr-1] and
// asserts the one-hot gnt for the first request it finds (gnt is all zero
// when req is). The selection is purely combinational, so request, grant and
// accept of one plane settle within the same cell time.
//
// Pointer update. Unlike iSLIP, the pointer does not depend on the match
// result: at the end of every cell time (every rising clock edge) it advances
// by one, modulo N. After reset it holds INIT, the 0-based initial value
// given by the algorithm (see sma_pkg).
//
// Timing: one clock cycle is one cell time. That, and the active-low
// synchronous reset, are choices of this design; the selection rule, the
// initial value and the unconditional advance follow the algorithm.
module sma_rr_arbiter #(
  parameter int unsigned N    = 64,
  parameter int unsigned INIT = 0,
  localparam int unsigned PW  = sma_pkg::idx_width(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  req,        // requests (GRP) or grants (ARP), by index
  output logic [N-1:0]  gnt,        // one-hot: first request at or after ptr
  output logic [PW-1:0] ptr         // current pointer, 0..N-1
);

  initial assert (INIT < N) else $error("INIT must be below N");

  always_ff @(posedge clk) begin
    if (!rst_n)
      ptr <= PW'(INIT);
    else
      ptr <= (ptr == PW'(N - 1)) ? '0 : ptr + PW'(1);
  end

  // Scan N positions starting at ptr, wrapping past N-1 to 0.
  always_comb begin
    logic found;
    int unsigned idx;
    gnt   = '0;
    found = 1'b0;
    for (int unsigned k = 0; k < N; k++) begin
      idx = int'(ptr) + k;
      if (idx >= N) idx -= N;
      if (!found && req[idx]) begin
        gnt[idx] = 1'b1;
        found    = 1'b1;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
  assert property (@(posedge clk) disable iff (!rst_n) (gnt & ~req) == '0);
  assert property (@(posedge clk) disable iff (!rst_n) (req != '0) |-> (gnt != '0));

endmodule
