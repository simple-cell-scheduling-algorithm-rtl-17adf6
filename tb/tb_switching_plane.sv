// tb_switching_plane: self-checking test of one N x N crossbar plane. For
// random partial permutations (each input to at most one output, each output
// from at most one input) and random input cells and valid flags, it checks
// every output against the cell of the input the configuration connects to
// it, and that unconnected outputs or idle inputs produce no valid cell.
// N = 6 with 12-bit cells, and the default N = 64 with 64-bit cells.
module tb_switching_plane;
  localparam int NA = 6,  WA = 12;
  localparam int NB = 64, WB = 64;
  int checks = 0, failures = 0;

  logic [NA-1:0][NA-1:0] cfg_a;
  logic [NA-1:0]         iv_a, ov_a;
  logic [NA-1:0][WA-1:0] ic_a, oc_a;
  logic [NB-1:0][NB-1:0] cfg_b;
  logic [NB-1:0]         iv_b, ov_b;
  logic [NB-1:0][WB-1:0] ic_b, oc_b;

  switching_plane #(.N(NA), .W(WA)) dut_a (.cfg(cfg_a), .in_valid(iv_a), .in_cell(ic_a), .out_valid(ov_a), .out_cell(oc_a));
  switching_plane dut_b (.cfg(cfg_b), .in_valid(iv_b), .in_cell(ic_b), .out_valid(ov_b), .out_cell(oc_b));

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // Random partial permutation: src[j] is the input connected to output j or -1.
  task automatic run(int n, output int src[64]);
    int perm[64];
    for (int k = 0; k < n; k++) perm[k] = k;
    for (int k = n - 1; k > 0; k--) begin
      int r, t;
      r = $urandom % (k + 1);
      t = perm[k]; perm[k] = perm[r]; perm[r] = t;
    end
    for (int j = 0; j < 64; j++) src[j] = -1;
    for (int j = 0; j < n; j++) if (($urandom % 4) != 0) src[j] = perm[j];
  endtask

  initial begin
    int src[64];
    repeat (500) begin
      run(NA, src);
      cfg_a = '0;
      for (int j = 0; j < NA; j++) if (src[j] >= 0) cfg_a[src[j]][j] = 1'b1;
      for (int i = 0; i < NA; i++) begin
        iv_a[i] = ($urandom % 5) != 0;
        ic_a[i] = WA'($urandom);
      end
      #1;
      for (int j = 0; j < NA; j++)
        if (src[j] >= 0 && iv_a[src[j]])
          check("small plane cell", ov_a[j] && oc_a[j] == ic_a[src[j]]);
        else
          check("small plane idle output", !ov_a[j]);
      #1;
    end
    repeat (100) begin
      run(NB, src);
      cfg_b = '0;
      for (int j = 0; j < NB; j++) if (src[j] >= 0) cfg_b[src[j]][j] = 1'b1;
      for (int i = 0; i < NB; i++) begin
        iv_b[i] = ($urandom % 5) != 0;
        ic_b[i] = {$urandom, $urandom};
      end
      #1;
      for (int j = 0; j < NB; j++)
        if (src[j] >= 0 && iv_b[src[j]])
          check("full plane cell", ov_b[j] && oc_b[j] == ic_b[src[j]]);
        else
          check("full plane idle output", !ov_b[j]);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
