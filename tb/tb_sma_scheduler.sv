// tb_sma_scheduler: self-checking test of the two-plane SMA scheduler.
// The testbench keeps its own model of the N x N virtual output queue
// occupancies, feeds the head-of-line status to the scheduler, applies its
// matches (two cells leave a queue matched on both planes, or one if it holds
// one) and adds random Bernoulli arrivals. It checks:
//  - every match is a granted request and no input or output is matched twice
//    on one plane;
//  - the pointer pairing: whenever A_ik points at j, G_jk points at i, and
//    plane 2's pointers sit N/2 away from plane 1's;
//  - the service guarantee: a non-empty queue is never left unmatched for
//    N/2 cell times in a row (at most N/2 - 1 consecutive misses);
//  - a queue that is the mutual top priority of a plane is always matched.
// N = 16, with light, heavy and saturating traffic phases.
module tb_sma_scheduler;
  localparam int N  = 16;
  localparam int PW = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [N-1:0][N-1:0]  req, g1, g2, a1, a2;
  logic [N-1:0][PW-1:0] gp1, ap1, gp2, ap2;

  sma_scheduler #(.N(N)) dut (.clk, .rst_n, .req, .grant1(g1), .grant2(g2),
    .accept1(a1), .accept2(a2), .gptr1(gp1), .aptr1(ap1), .gptr2(gp2), .aptr2(ap2));

  int occ[N][N];
  int miss[N][N];
  int max_miss = 0;
  int dual = 0, dual_single = 0, served = 0;

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic cycle(int load_pct);
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) req[i][j] = (occ[i][j] > 0);
    #1;
    // Structural checks on both planes.
    for (int x = 0; x < N; x++) begin
      int r1 = 0, c1 = 0, r2 = 0, c2 = 0;
      for (int y = 0; y < N; y++) begin
        r1 += a1[x][y]; c1 += a1[y][x];
        r2 += a2[x][y]; c2 += a2[y][x];
      end
      check("plane 1 one match per input/output", r1 <= 1 && c1 <= 1);
      check("plane 2 one match per input/output", r2 <= 1 && c2 <= 1);
      // Pointer pairing: a_ik = j implies g_jk = i.
      check("plane 1 pairing", gp1[ap1[x]] == PW'(x));
      check("plane 2 pairing", gp2[ap2[x]] == PW'(x));
      check("plane offset N/2", ((int'(ap1[x]) - int'(ap2[x]) + N) % N) == N/2);
    end
    check("accept within grant", ((a1 & ~g1) == '0) && ((a2 & ~g2) == '0));
    check("grant within request", ((g1 & ~req) == '0) && ((g2 & ~req) == '0));
    // Mutual top priority is always matched; service and miss counters.
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        if (req[i][j] && ap1[i] == PW'(j)) check("paired queue matched on plane 1", a1[i][j]);
        if (req[i][j] && ap2[i] == PW'(j)) check("paired queue matched on plane 2", a2[i][j]);
        if (occ[i][j] > 0) begin
          if (a1[i][j] || a2[i][j]) begin
            miss[i][j] = 0;
            served++;
          end else begin
            miss[i][j]++;
            if (miss[i][j] > max_miss) max_miss = miss[i][j];
            check("service within N/2 cell times", miss[i][j] <= N/2 - 1);
          end
        end else miss[i][j] = 0;
        if (a1[i][j] && a2[i][j]) begin
          if (occ[i][j] >= 2) begin occ[i][j] -= 2; dual++; end
          else begin occ[i][j] -= 1; dual_single++; end
        end else if (a1[i][j] || a2[i][j]) occ[i][j] -= 1;
      end
    // Arrivals: one Bernoulli cell per input, uniform destination.
    for (int i = 0; i < N; i++)
      if (($urandom % 100) < load_pct) occ[i][$urandom % N] += 1;
    @(negedge clk);
  endtask

  initial begin
    req = '0;
    foreach (occ[i, j]) begin occ[i][j] = 0; miss[i][j] = 0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (300) cycle(30);
    repeat (300) cycle(95);
    // Saturation: every queue always has cells.
    foreach (occ[i, j]) occ[i][j] += 1000;
    repeat (200) cycle(100);
    check("a queue was matched on both planes with two cells", dual > 0);
    check("a single-cell queue was matched on both planes", dual_single > 0);
    $display("served=%0d dual=%0d dual_single=%0d longest unmatched run=%0d (bound %0d)",
             served, dual, dual_single, max_miss, N/2 - 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
