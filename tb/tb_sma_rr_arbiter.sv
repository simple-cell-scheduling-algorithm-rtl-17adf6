// tb_sma_rr_arbiter: self-checking test of the round-robin pointer arbiter.
// Two instances are checked against a reference model written in the
// testbench: N = 5 with INIT = 3 (a non-power-of-two size and a wrap of the
// pointer) and the default size N = 64 with INIT = 17. Every cycle the
// pointer must equal INIT + cycles since reset (mod N), and the grant must be
// the first request found scanning upward from the pointer, wrapping around.
// Requests are random, with sparse, empty and full patterns mixed in.
module tb_sma_rr_arbiter;
  localparam int N1 = 5,  I1 = 3;
  localparam int N2 = 64, I2 = 17;

  logic clk = 0, rst_n = 0;
  logic [N1-1:0] req1, gnt1;
  logic [N2-1:0] req2, gnt2;
  logic [2:0] ptr1;
  logic [5:0] ptr2;
  int checks = 0, failures = 0;

  sma_rr_arbiter #(.N(N1), .INIT(I1)) dut1 (.clk, .rst_n, .req(req1), .gnt(gnt1), .ptr(ptr1));
  sma_rr_arbiter #(.N(N2), .INIT(I2)) dut2 (.clk, .rst_n, .req(req2), .gnt(gnt2), .ptr(ptr2));

  always #5 clk = ~clk;

  function automatic logic [63:0] ref_gnt(logic [63:0] req, int p, int n);
    for (int k = 0; k < n; k++)
      if (req[(p + k) % n]) return 64'd1 << ((p + k) % n);
    return '0;
  endfunction

  function automatic logic [63:0] rand_req(int n, int mode);
    logic [63:0] r;
    r = {$urandom, $urandom};
    case (mode)
      0: r = '0;
      1: r = '1;
      2: r = 64'd1 << ($urandom % n);
      3: r = r & {$urandom, $urandom} & {$urandom, $urandom};
      default: ;
    endcase
    if (n < 64) r &= (64'd1 << n) - 1;
    return r;
  endfunction

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    int t;
    req1 = '0; req2 = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    t = 0;
    repeat (400) begin
      req1 = N1'(rand_req(N1, $urandom % 6));
      req2 = rand_req(N2, $urandom % 6);
      #1;
      check("ptr1", 64'(ptr1), 64'(int'((I1 + t) % N1)));
      check("ptr2", 64'(ptr2), 64'(int'((I2 + t) % N2)));
      check("gnt1", 64'(gnt1), ref_gnt(64'(req1), (I1 + t) % N1, N1));
      check("gnt2", 64'(gnt2), ref_gnt(req2, (I2 + t) % N2, N2));
      @(negedge clk);
      t++;
    end
    // A reset in the middle returns the pointer to its initial value.
    rst_n = 0;
    @(negedge clk) rst_n = 1;
    #1;
    check("ptr1 after reset", 64'(ptr1), 64'(I1));
    check("ptr2 after reset", 64'(ptr2), 64'(I2));
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
