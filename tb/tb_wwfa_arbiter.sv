// tb_wwfa_arbiter -- test of the wrapped wave front arbiter, plain and with
// the starvation guard.
//
// Two 4 x 4 arbiters see the same random requests and blocked ports. For
// the plain one the testbench's priority diagonal steps every cycle. For the
// guarded one it keeps, per diagonal turn, the set of requests seen in the
// turn's first cycle, removes those granted or withdrawn, and lets the
// diagonal go only when that set is empty. Grants are checked in the same
// cycle against the sequential wave model. A directed phase then keeps one
// crosspoint of the priority diagonal requested with its port blocked while
// a new request appears on the same diagonal, and checks that the diagonal
// keeps the priority for the old request only.
module tb_wwfa_arbiter;
  import tb_arb_ref_pkg::*;

  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  logic [N-1:0][N-1:0] req, g0, g1;
  logic [N-1:0]        opb, d0, d1;
  int checks = 0, failures = 0;
  int pk[2];
  bit fresh;
  bit pend[N];
  int n_hold = 0, n_multi = 0, n_latch_drop = 0;

  wwfa_arbiter #(.N(N), .HOLD_PRIORITY(1'b0)) dut0 (
    .clk, .rst_n, .req, .opb, .grant(g0), .top_diag(d0));
  wwfa_arbiter #(.N(N), .HOLD_PRIORITY(1'b1)) dut1 (
    .clk, .rst_n, .req, .opb, .grant(g1), .top_diag(d1));

  always #5 clk = ~clk;

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h at %0t", what, got, exp, $time);
    end
  endtask

  task automatic cycle_check();
    mat_t e0, e1;
    bit any_left;
    #1;
    e0 = ref_wwfa(mat_t'(req), 8'(opb), N, pk[0]);
    e1 = ref_wwfa(mat_t'(req), 8'(opb), N, pk[1]);
    check("grant plain", 64'(g0), e0);
    check("grant hold", 64'(g1), e1);
    check("diag plain", 64'(d0), 64'(1) << pk[0]);
    check("diag hold", 64'(d1), 64'(1) << pk[1]);
    if (popcount(e0) > 1) n_multi++;
    // Guarded model: per row, the crosspoint of that row on the diagonal.
    any_left = 0;
    for (int i = 0; i < N; i++) begin
      int j = (pk[1] - i + N) % N;
      bit lat = fresh ? req[i][j] : pend[i];
      if (!fresh && pend[i] && !req[i][j] && !e1[i*N+j]) n_latch_drop++;
      pend[i] = lat && req[i][j] && !e1[i*N+j];
      if (pend[i]) any_left = 1;
    end
    @(posedge clk);
    pk[0] = (pk[0] + 1) % N;
    if (any_left) begin n_hold++; fresh = 0; end
    else begin pk[1] = (pk[1] + 1) % N; fresh = 1; end
    @(negedge clk);
  endtask

  initial begin
    int k, i0, i1;
    pk = '{0, 0};
    fresh = 1;
    for (int i = 0; i < N; i++) pend[i] = 0;
    req = '0; opb = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      int density;
      density = 1 + $urandom % 4;
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) req[i][j] = ($urandom % 4) < density;
      for (int j = 0; j < N; j++) opb[j] = ($urandom % 6) == 0;
      cycle_check();
    end
    // Directed phase: wait for a fresh diagonal turn on the guarded arbiter.
    req = '0; opb = '0;
    while (!fresh) cycle_check();
    k = pk[1];
    i0 = 0; i1 = 1;
    req[i0][(k - i0 + N) % N] = 1'b1;      // old request, port blocked
    opb[(k - i0 + N) % N] = 1'b1;
    for (int t = 0; t < 5; t++) begin
      if (t == 1) req[i1][(k - i1 + N) % N] = 1'b1;  // new request, same diagonal
      cycle_check();
      checks++;
      if (pk[1] != k || d1 != (N'(1) << k)) begin
        failures++; $display("FAIL diagonal did not keep the priority");
      end
    end
    // Old request now served: the new one must not keep the diagonal.
    opb = '0;
    cycle_check();
    checks++;
    if (pk[1] == k || d1 == (N'(1) << k)) begin
      failures++; $display("FAIL late request extended the diagonal's turn");
    end
    req = '0;
    cycle_check();
    $display("holds=%0d multi_grant_cycles=%0d", n_hold, n_multi);
    checks++;
    if (n_hold == 0 || n_multi == 0) begin
      failures++; $display("FAIL a mechanism was never exercised");
    end
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
