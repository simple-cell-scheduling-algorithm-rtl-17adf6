// tb_sma_plane: self-checking test of one plane of the SMA scheduler.
// Part 1 replays the four-port example of the algorithm (head-of-line matrix
// below) on a plane-1 instance (pointers 4,3,2,1 in 1-based terms) and a
// plane-2 instance (pointers 2,1,4,3), and compares grants, accepts and the
// pointers after one cell time with the worked-out values. Part 2 runs an
// instance with N = 7 on random requests for many cell times against a
// reference model of request-grant-accept with round-robin pointers, and
// checks that a matched pair never shares an input or an output.
module tb_sma_plane;
  localparam int NE = 4;
  localparam int NR = 7;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [NE-1:0][NE-1:0] hol_e, g1, a1, g2, a2;
  logic [NE-1:0][1:0]    gp1, ap1, gp2, ap2;
  logic [NR-1:0][NR-1:0] req_r, gr, ar;
  logic [NR-1:0][2:0]    gpr, apr;

  sma_plane #(.N(NE), .INIT_BASE(NE))   p1 (.clk, .rst_n, .req(hol_e), .grant(g1), .accept(a1), .gptr(gp1), .aptr(ap1));
  sma_plane #(.N(NE), .INIT_BASE(NE/2)) p2 (.clk, .rst_n, .req(hol_e), .grant(g2), .accept(a2), .gptr(gp2), .aptr(ap2));
  sma_plane #(.N(NR), .INIT_BASE(NR))   pr (.clk, .rst_n, .req(req_r), .grant(gr), .accept(ar), .gptr(gpr), .aptr(apr));

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // Build an N x N matrix from a list of (i, j) pairs.
  function automatic logic [NE-1:0][NE-1:0] mat(int p[$]);
    logic [NE-1:0][NE-1:0] m = '0;
    for (int k = 0; k < p.size(); k += 2) m[p[k]][p[k+1]] = 1'b1;
    return m;
  endfunction

  // Reference request-grant-accept pass for the random instance.
  int gptr_m[NR], aptr_m[NR];
  task automatic ref_match(input logic [NR-1:0][NR-1:0] rq,
                           output logic [NR-1:0][NR-1:0] gm,
                           output logic [NR-1:0][NR-1:0] am);
    gm = '0; am = '0;
    for (int j = 0; j < NR; j++)
      for (int k = 0; k < NR; k++) begin
        int i = (gptr_m[j] + k) % NR;
        if (rq[i][j]) begin gm[i][j] = 1'b1; break; end
      end
    for (int i = 0; i < NR; i++)
      for (int k = 0; k < NR; k++) begin
        int j = (aptr_m[i] + k) % NR;
        if (gm[i][j]) begin am[i][j] = 1'b1; break; end
      end
  endtask

  initial begin
    logic [NR-1:0][NR-1:0] gm, am;
    // Rows are inputs 1..4, columns outputs 1..4 (1-based in the example).
    hol_e = '0;
    hol_e[0] = 4'b0010;   // row 1: 0 1 0 0 (bit j = output j)
    hol_e[1] = 4'b1100;   // row 2: 0 0 1 1
    hol_e[2] = 4'b1011;   // row 3: 1 1 0 1
    hol_e[3] = 4'b1001;   // row 4: 1 0 0 1
    req_r = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    #1;
    // Initial pointers, 0-based: plane 1 {3,2,1,0}, plane 2 {1,0,3,2}.
    for (int x = 0; x < NE; x++) begin
      check("plane1 gptr init", gp1[x], (NE - 1 - x));
      check("plane1 aptr init", ap1[x], (NE - 1 - x));
      check("plane2 gptr init", gp2[x], (NE/2 - 1 - x + NE) % NE);
      check("plane2 aptr init", ap2[x], (NE/2 - 1 - x + NE) % NE);
    end
    check("plane1 grant",  g1, mat('{3,0, 2,1, 1,2, 1,3}));
    check("plane1 accept", a1, mat('{3,0, 2,1, 1,2}));
    check("plane2 grant",  g2, mat('{2,0, 0,1, 1,2, 2,3}));
    check("plane2 accept", a2, mat('{0,1, 1,2, 2,3}));
    @(negedge clk);
    // After one cell time: plane 1 {1,4,3,2}, plane 2 {3,2,1,4} (1-based).
    for (int x = 0; x < NE; x++) begin
      check("plane1 gptr next", gp1[x], (NE - x) % NE);
      check("plane1 aptr next", ap1[x], (NE - x) % NE);
      check("plane2 gptr next", gp2[x], (NE/2 - x + NE) % NE);
      check("plane2 aptr next", ap2[x], (NE/2 - x + NE) % NE);
    end

    // Part 2: random requests against the reference model.
    rst_n = 0;
    @(negedge clk) rst_n = 1;
    for (int x = 0; x < NR; x++) begin
      gptr_m[x] = NR - 1 - x;
      aptr_m[x] = NR - 1 - x;
    end
    repeat (300) begin
      int dens;
      dens = $urandom % 4;
      for (int i = 0; i < NR; i++)
        for (int j = 0; j < NR; j++)
          req_r[i][j] = (($urandom % 4) <= dens) && (dens != 0);
      #1;
      ref_match(req_r, gm, am);
      check("random grant",  gr, gm);
      check("random accept", ar, am);
      for (int x = 0; x < NR; x++) begin
        check("random gptr", gpr[x], gptr_m[x]);
        check("random aptr", apr[x], aptr_m[x]);
        check("one per input",  $countones(ar[x]) <= 1, 1);
      end
      @(negedge clk);
      for (int x = 0; x < NR; x++) begin
        gptr_m[x] = (gptr_m[x] + 1) % NR;
        aptr_m[x] = (aptr_m[x] + 1) % NR;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
