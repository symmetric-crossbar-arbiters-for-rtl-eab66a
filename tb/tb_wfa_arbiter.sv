// tb_wfa_arbiter -- test of the wave front arbiter, plain and with the
// starvation guard.
//
// Two 4 x 4 arbiters see the same random requests and blocked ports. The
// testbench keeps its own top-priority row and column for each: the column
// steps every cycle, the row steps when the column wraps from the last
// column to the first, and for the guarded arbiter neither steps in a cycle
// in which the top crosspoint is requested but not granted. Grants are
// checked in the same cycle as the requests (arbitration takes no clock
// cycle) against the sequential wave model, and the ring outputs against the
// testbench's priority. A directed phase then blocks one output port for
// many cycles under full load: the guarded arbiter must keep the priority on
// that column and grant the waiting crosspoint in the first cycle the port
// is free again.
module tb_wfa_arbiter;
  import tb_arb_ref_pkg::*;

  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  logic [N-1:0][N-1:0] req, g0, g1;
  logic [N-1:0]        opb, c0, r0, c1, r1;
  int checks = 0, failures = 0;
  int pr[2], pc[2];
  int n_hold = 0, n_row_step = 0, n_multi = 0, n_blocked = 0;

  wfa_arbiter #(.N(N), .HOLD_PRIORITY(1'b0)) dut0 (
    .clk, .rst_n, .req, .opb, .grant(g0), .top_col(c0), .top_row(r0));
  wfa_arbiter #(.N(N), .HOLD_PRIORITY(1'b1)) dut1 (
    .clk, .rst_n, .req, .opb, .grant(g1), .top_col(c1), .top_row(r1));

  always #5 clk = ~clk;

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h at %0t", what, got, exp, $time);
    end
  endtask

  // Check both arbiters in the current cycle, then step the model.
  task automatic cycle_check();
    mat_t e0, e1;
    #1;
    e0 = ref_wfa(mat_t'(req), 8'(opb), N, pr[0], pc[0]);
    e1 = ref_wfa(mat_t'(req), 8'(opb), N, pr[1], pc[1]);
    check("grant plain", 64'(g0), e0);
    check("grant hold", 64'(g1), e1);
    check("top_col plain", 64'(c0), 64'(1) << pc[0]);
    check("top_row plain", 64'(r0), 64'(1) << pr[0]);
    check("top_col hold", 64'(c1), 64'(1) << pc[1]);
    check("top_row hold", 64'(r1), 64'(1) << pr[1]);
    if (popcount(e0) > 1) n_multi++;
    if ((req & {N{opb}}) != '0) n_blocked++;
    @(posedge clk);
    for (int a = 0; a < 2; a++) begin
      bit stay;
      stay = (a == 1) && req[pr[a]][pc[a]] && !e1[pr[a]*N+pc[a]];
      if (stay) n_hold++;
      else begin
        if (pc[a] == N - 1) begin pr[a] = (pr[a] + 1) % N; n_row_step++; end
        pc[a] = (pc[a] + 1) % N;
      end
    end
    @(negedge clk);
  endtask

  initial begin
    int blk_col, wait_row;
    pr = '{0, 0}; pc = '{0, 0};
    req = '0; opb = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // Random phase.
    for (int t = 0; t < 2000; t++) begin
      int density;
      density = 1 + $urandom % 4;
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) req[i][j] = ($urandom % 4) < density;
      for (int j = 0; j < N; j++) opb[j] = ($urandom % 6) == 0;
      cycle_check();
    end
    // Directed phase: full load, the guarded arbiter's top column blocked.
    req = '1;
    blk_col = pc[1];
    wait_row = pr[1];
    opb = '0;
    opb[blk_col] = 1'b1;
    for (int t = 0; t < 3 * N * N; t++) begin
      cycle_check();
      checks++;
      if (pc[1] != blk_col || c1 != (N'(1) << blk_col)) begin
        failures++; $display("FAIL guarded priority left the blocked column");
      end
    end
    opb = '0;
    #1;
    checks++;
    if (!g1[wait_row][blk_col]) begin
      failures++; $display("FAIL waiting crosspoint not granted after unblock");
    end
    cycle_check();
    $display("holds=%0d row_steps=%0d multi_grant_cycles=%0d blocked_cycles=%0d",
             n_hold, n_row_step, n_multi, n_blocked);
    checks++;
    if (n_hold == 0 || n_row_step == 0 || n_multi == 0 || n_blocked == 0) begin
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
