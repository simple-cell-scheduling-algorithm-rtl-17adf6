// tb_input_buffer_module: self-checking test of an input buffer module with
// N = 4 virtual output queues of depth 4. A queue model in the testbench
// follows every cell. Each cell time the testbench offers a random arrival
// and picks random plane-1 and plane-2 matches among the non-empty queues
// (often the same queue on both planes). It checks the head-of-line flags,
// the cells on both plane outputs (a queue matched on both planes sends its
// first two cells, plane 1 first, or only plane 1 if it holds one cell), the
// drop flag when an arrival finds its queue full, and that every queue is
// first-in first-out.
module tb_input_buffer_module;
  localparam int N = 4, D = 4, W = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic          in_valid, in_drop, p1_valid, p2_valid;
  logic [1:0]    in_dest;
  logic [W-1:0]  in_cell, p1_cell, p2_cell;
  logic [N-1:0]  hol, acc1, acc2;

  input_buffer_module #(.N(N), .DEPTH(D), .W(W)) dut (.*);

  logic [W-1:0] q[N][$];
  int n_drop = 0, n_two = 0, n_lone = 0, n_both_planes = 0;
  logic [W-1:0] tag = 1;

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic int pick_nonempty();
    int c[$];
    for (int j = 0; j < N; j++) if (q[j].size() > 0) c.push_back(j);
    if (c.size() == 0) return -1;
    return c[$urandom % c.size()];
  endfunction

  initial begin
    in_valid = 0; in_dest = 0; in_cell = 0; acc1 = 0; acc2 = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (3000) begin
      int j1, j2, pops[N];
      logic [W-1:0] e1, e2;
      bit v1, v2;
      // Matches among non-empty queues.
      j1 = (($urandom % 5) < 2) ? pick_nonempty() : -1;
      j2 = (($urandom % 5) < 2) ? pick_nonempty() : -1;
      if (j1 >= 0 && ($urandom % 3) == 0) j2 = j1;
      acc1 = (j1 >= 0) ? N'(1) << j1 : '0;
      acc2 = (j2 >= 0) ? N'(1) << j2 : '0;
      in_valid = ($urandom % 100) < 85;
      in_dest  = 2'($urandom % N);
      in_cell  = tag;
      #1;
      for (int j = 0; j < N; j++) begin
        check("hol flag", hol[j] == (q[j].size() > 0));
        pops[j] = 0;
      end
      v1 = 0; v2 = 0; e1 = 0; e2 = 0;
      if (j1 >= 0) begin v1 = 1; e1 = q[j1][0]; pops[j1]++; end
      if (j2 >= 0) begin
        if (j2 != j1) begin v2 = 1; e2 = q[j2][0]; pops[j2]++; n_both_planes++; end
        else if (q[j2].size() >= 2) begin v2 = 1; e2 = q[j2][1]; pops[j2]++; n_two++; end
        else n_lone++;
      end
      check("plane 1 valid", p1_valid == v1);
      check("plane 2 valid", p2_valid == v2);
      if (v1) check("plane 1 cell", p1_cell == e1);
      if (v2) check("plane 2 cell", p2_cell == e2);
      for (int j = 0; j < N; j++) repeat (pops[j]) void'(q[j].pop_front());
      if (in_valid) begin
        bit full;
        full = q[in_dest].size() >= D;
        check("drop flag", in_drop == full);
        if (full) n_drop++;
        else q[in_dest].push_back(in_cell);
        tag++;
      end else check("no drop without arrival", !in_drop);
      @(negedge clk);
    end
    check("queue full drop seen", n_drop > 0);
    check("two cells sent over both planes", n_two > 0);
    check("lone cell matched twice", n_lone > 0);
    $display("drops=%0d two-cell=%0d lone=%0d distinct=%0d", n_drop, n_two, n_lone, n_both_planes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
