// tb_output_buffer_module: self-checking test of an output buffer module with
// a queue of depth 8. Random cells arrive on zero, one or both planes each
// cell time (bursts fill the queue, quiet spells drain it). A reference queue
// in the testbench predicts the output cell, its valid flag and the number of
// refused cells; it checks that two simultaneous arrivals are queued plane 1
// first, that one cell leaves per cell time, and that a cell written in one
// cell time is on the output in the next.
module tb_output_buffer_module;
  localparam int D = 8, W = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic         c1_valid, c2_valid, out_valid;
  logic [W-1:0] c1_cell, c2_cell, out_cell;
  logic [1:0]   drop_n;

  output_buffer_module #(.DEPTH(D), .W(W)) dut (.*);

  logic [W-1:0] q[$];
  int n_drop = 0, n_pair = 0, n_latency1 = 0;
  logic [W-1:0] tag = 1;

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    int room, offered, exp_drop;
    bit was_empty, pend;
    logic [W-1:0] pend_cell;
    c1_valid = 0; c2_valid = 0; c1_cell = 0; c2_cell = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    #1 check("empty after reset", !out_valid);
    pend = 0;
    pend_cell = '0;
    for (int t = 0; t < 3000; t++) begin
      int pct;
      pct = ((t / 100) % 2) ? 80 : 30;
      c1_valid = ($urandom % 100) < pct;
      c2_valid = ($urandom % 100) < pct;
      c1_cell = tag; c2_cell = tag + 1;
      #1;
      // A cell written into an empty queue is on the output one cell time later.
      if (pend) begin
        n_latency1++;
        check("one cell time to output", out_valid && out_cell == pend_cell);
      end
      check("out valid", out_valid == (q.size() > 0));
      if (q.size() > 0) check("out cell", out_cell == q[0]);
      was_empty = (q.size() == 0);
      if (q.size() > 0) void'(q.pop_front());
      room = D - q.size();
      offered = int'(c1_valid) + int'(c2_valid);
      exp_drop = (offered > room) ? offered - room : 0;
      check("drop count", int'(drop_n) == exp_drop);
      n_drop += exp_drop;
      if (c1_valid && c2_valid) n_pair++;
      if (c1_valid && room > 0) begin q.push_back(c1_cell); room--; end
      if (c2_valid && room > 0) begin q.push_back(c2_cell); room--; end
      pend = was_empty && (c1_valid || c2_valid);
      pend_cell = c1_valid ? c1_cell : c2_cell;
      @(negedge clk);
      tag += 2;
    end
    check("overflow seen", n_drop > 0);
    check("two arrivals seen", n_pair > 0);
    check("latency case seen", n_latency1 > 0);
    $display("drops=%0d pairs=%0d", n_drop, n_pair);
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
