// atm_switch_env: stimulus and scoreboard for end-to-end tests of
// atm_switch_top, shared by the reduced-size and the full-size testbenches.
//
// Stimulus, one cell time per clock cycle, in phases:
//  1. Bernoulli arrivals with uniformly distributed destinations, at each
//     load of LOAD_PM (per mille) for LOAD_CYC cell times; the mean and the
//     variance of the cell delay are printed per load;
//  2. a hot spot: every input sends a cell to output 0 in every cell time for
//     HOT_CYC cell times, which fills virtual output queues and output queue 0;
//  3. no arrivals for DRAIN_CYC cell times, after which the switch must be
//     empty.
// Every cell carries {source, destination, sequence number, arrival time}.
//
// Checks, all against models kept here:
//  - every cell leaves at its own output, intact, in order within its
//    (input, output) flow, no earlier than two cell times after arriving, and
//    every cell not reported lost leaves before the end;
//  - in_drop is set exactly when the virtual output queue is full after this
//    cell time's departures; out_drop and out_valid follow an output queue
//    occupancy model;
//  - a non-empty virtual output queue is matched at least once in every N/2
//    cell times (the scheduler's service guarantee);
// and it counts how often each mechanism happened (a full virtual output
// queue, a full output queue, two cells sent by one queue over both planes,
// a lone cell matched on both planes, two cells reaching one output in one
// cell time, a cell through each plane); one that never happened is a failure.
module atm_switch_env #(
  parameter int unsigned N          = 8,
  parameter int unsigned W          = 64,
  parameter int unsigned VOQ_DEPTH  = 4,
  parameter int unsigned OBUF_DEPTH = 8,
  parameter int unsigned NLOADS     = 2,
  parameter int unsigned LOAD_PM [8] = '{600, 900, 0, 0, 0, 0, 0, 0},  // first NLOADS used
  parameter int unsigned LOAD_CYC   = 500,
  parameter int unsigned HOT_CYC    = 100,
  parameter int unsigned DRAIN_CYC  = 0,   // 0: enough to empty every queue
  localparam int unsigned DW        = (N > 1) ? $clog2(N) : 1
) (
  input  logic                 clk,
  output logic                 rst_n,
  output logic [N-1:0]         in_valid,
  output logic [N-1:0][DW-1:0] in_dest,
  output logic [N-1:0][W-1:0]  in_cell,
  input  logic [N-1:0]         in_drop,
  input  logic [N-1:0]         out_valid,
  input  logic [N-1:0][W-1:0]  out_cell,
  input  logic [N-1:0][1:0]    out_drop,
  // switch internals observed for the mechanism counts and the guarantee
  input  logic [N-1:0][N-1:0]  hol,
  input  logic [N-1:0][N-1:0]  accept1,
  input  logic [N-1:0][N-1:0]  accept2,
  input  logic [N-1:0]         x1_valid,
  input  logic [N-1:0][W-1:0]  x1_cell,
  input  logic [N-1:0]         x2_valid,
  input  logic [N-1:0][W-1:0]  x2_cell
);

  localparam int unsigned DRAIN = (DRAIN_CYC != 0) ? DRAIN_CYC
                                : N * VOQ_DEPTH + 2 * OBUF_DEPTH + 2 * N + 10;
  localparam int unsigned TOTAL = NLOADS * LOAD_CYC + HOT_CYC + DRAIN + 20;

  int checks = 0, failures = 0;
  longint t = 0;

  // Flow model: cells of flow (i, j) not yet delivered, oldest first.
  logic [W-1:0] flow[N][N][$];
  int voq_occ[N][N];
  int obuf_occ[N];
  int miss[N][N];
  int seq[N];

  // Mechanism counters.
  longint n_in = 0, n_out = 0, n_voq_full = 0, n_obuf_full = 0;
  longint n_dual_two = 0, n_dual_lone = 0, n_two_in = 0, n_plane1 = 0, n_plane2 = 0;
  int max_miss = 0;

  // Delay statistics (delay beyond the two-cell-time minimum).
  longint d_n, d_sum, d_sq;

  function automatic logic [W-1:0] mk(int src, int dst, int sq, longint ts);
    logic [63:0] c;
    c = {8'(src), 8'(dst), 16'(sq), 32'(ts)};
    return W'(c);
  endfunction

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at cell time %0d", what, t);
    end
  endtask

  task automatic remove_cell(logic [W-1:0] c);
    int s, d;
    s = int'(c[63:56]); d = int'(c[55:48]);
    foreach (flow[s][d][k])
      if (flow[s][d][k] == c) begin
        flow[s][d].delete(k);
        return;
      end
    check("lost cell is a known cell", 0);
  endtask

  // One cell time: drive arrivals (mode 0 none, 1 Bernoulli, 2 hot spot),
  // then observe and check.
  task automatic cell_time(int mode, int load_pm, bit measure);
    int dep[N][N];
    int s, d, room, n_arr;
    logic [W-1:0] c;
    for (int i = 0; i < N; i++) begin
      in_valid[i] = 1'b0;
      in_dest[i]  = '0;
      in_cell[i]  = '0;
      if (mode == 2 || (mode == 1 && ($urandom % 1000) < load_pm)) begin
        in_valid[i] = 1'b1;
        in_dest[i]  = (mode == 2) ? '0 : DW'($urandom % N);
        in_cell[i]  = mk(i, int'(in_dest[i]), seq[i], t);
        seq[i]++;
      end
    end
    #1;
    foreach (dep[a, b]) dep[a][b] = 0;
    // Cells through the planes leave their virtual output queues.
    for (int j = 0; j < N; j++) begin
      if (x1_valid[j]) begin
        s = int'(x1_cell[j][63:56]); d = int'(x1_cell[j][55:48]);
        check("plane 1 cell at its output", d == j);
        dep[s][d]++; n_plane1++;
      end
      if (x2_valid[j]) begin
        s = int'(x2_cell[j][63:56]); d = int'(x2_cell[j][55:48]);
        check("plane 2 cell at its output", d == j);
        dep[s][d]++; n_plane2++;
      end
      if (x1_valid[j] && x2_valid[j]) n_two_in++;
    end
    // Scheduler: matches, dual matches and the service guarantee.
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        check("head-of-line flag", hol[i][j] == (voq_occ[i][j] > 0));
        if (accept1[i][j] && accept2[i][j]) begin
          if (voq_occ[i][j] >= 2) n_dual_two++; else n_dual_lone++;
          check("dual match sends min(2, occupancy)", dep[i][j] == ((voq_occ[i][j] >= 2) ? 2 : 1));
        end else
          check("departures follow matches", dep[i][j] == int'(accept1[i][j]) + int'(accept2[i][j]));
        if (voq_occ[i][j] > 0) begin
          if (accept1[i][j] || accept2[i][j]) miss[i][j] = 0;
          else begin
            miss[i][j]++;
            if (miss[i][j] > max_miss) max_miss = miss[i][j];
            check("matched within N/2 cell times", miss[i][j] <= N/2 - 1);
          end
        end else miss[i][j] = 0;
        voq_occ[i][j] -= dep[i][j];
      end
    // Arrivals and virtual output queue overflow.
    for (int i = 0; i < N; i++) begin
      if (in_valid[i]) begin
        d = int'(in_dest[i]);
        check("input drop iff queue full", in_drop[i] == (voq_occ[i][d] >= VOQ_DEPTH));
        if (voq_occ[i][d] >= VOQ_DEPTH) n_voq_full++;
        else begin
          voq_occ[i][d]++;
          flow[i][d].push_back(in_cell[i]);
          n_in++;
        end
      end else check("no input drop when idle", !in_drop[i]);
    end
    // Outputs: departures first, then arrivals and overflow.
    for (int j = 0; j < N; j++) begin
      check("output valid iff queue not empty", out_valid[j] == (obuf_occ[j] > 0));
      if (out_valid[j]) begin
        c = out_cell[j];
        s = int'(c[63:56]); d = int'(c[55:48]);
        check("cell at its output", d == j && s < N);
        if (d == j && s < N) begin
          check("cell in flow order", flow[s][d].size() > 0 && flow[s][d][0] == c);
          if (flow[s][d].size() > 0 && flow[s][d][0] == c) void'(flow[s][d].pop_front());
          check("minimum latency two cell times", t - longint'(c[31:0]) >= 2);
          if (measure) begin
            longint dl;
            dl = t - longint'(c[31:0]) - 2;
            d_n++; d_sum += dl; d_sq += dl * dl;
          end
        end
        n_out++;
        obuf_occ[j]--;
      end
      n_arr = int'(x1_valid[j]) + int'(x2_valid[j]);
      room = OBUF_DEPTH - obuf_occ[j];
      check("output drop count", int'(out_drop[j]) == ((n_arr > room) ? n_arr - room : 0));
      if (n_arr > room) begin
        n_obuf_full += n_arr - room;
        if (n_arr - room == 2) begin remove_cell(x1_cell[j]); remove_cell(x2_cell[j]); end
        else remove_cell(x2_valid[j] ? x2_cell[j] : x1_cell[j]);
        obuf_occ[j] = OBUF_DEPTH;
      end else obuf_occ[j] += n_arr;
    end
    @(negedge clk);
    t++;
  endtask

  longint lost_before = 0;

  task automatic report_delay(int load_pm);
    real mean, var_;
    mean = (d_n > 0) ? real'(d_sum) / real'(d_n) : 0.0;
    var_ = (d_n > 0) ? real'(d_sq) / real'(d_n) - mean * mean : 0.0;
    $display("load %0d.%03d: %0d cells, mean delay %0.3f cell times, delay variance %0.3f, cells lost %0d",
             load_pm / 1000, load_pm % 1000, d_n, mean, var_, n_voq_full + n_obuf_full - lost_before);
    lost_before = n_voq_full + n_obuf_full;
  endtask

  initial begin
    int empty;
    rst_n = 1'b0;
    in_valid = '0; in_dest = '0; in_cell = '0;
    foreach (voq_occ[a, b]) begin voq_occ[a][b] = 0; miss[a][b] = 0; end
    foreach (obuf_occ[a]) obuf_occ[a] = 0;
    foreach (seq[a]) seq[a] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int l = 0; l < NLOADS; l++) begin
      d_n = 0; d_sum = 0; d_sq = 0;
      repeat (LOAD_CYC) cell_time(1, LOAD_PM[l], 1'b1);
      report_delay(LOAD_PM[l]);
    end
    repeat (HOT_CYC) cell_time(2, 1000, 1'b0);
    repeat (DRAIN) cell_time(0, 0, 1'b0);
    empty = 1;
    foreach (flow[a, b]) if (flow[a][b].size() != 0) empty = 0;
    check("every accepted cell delivered", empty == 1);
    $display("cells in=%0d out=%0d lost at inputs=%0d lost at outputs=%0d", n_in, n_out, n_voq_full, n_obuf_full);
    $display("plane 1 cells=%0d plane 2 cells=%0d two-cell dual matches=%0d lone-cell dual matches=%0d two cells into one output=%0d",
             n_plane1, n_plane2, n_dual_two, n_dual_lone, n_two_in);
    $display("longest unmatched run of a non-empty queue=%0d cell times (bound %0d)", max_miss, N/2 - 1);
    check("mechanism: full virtual output queue", n_voq_full > 0);
    check("mechanism: full output queue", n_obuf_full > 0);
    check("mechanism: two cells from one queue over both planes", n_dual_two > 0);
    check("mechanism: lone cell matched on both planes", n_dual_lone > 0);
    check("mechanism: two cells into one output", n_two_in > 0);
    check("mechanism: cells through plane 1", n_plane1 > 0);
    check("mechanism: cells through plane 2", n_plane2 > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (TOTAL + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
