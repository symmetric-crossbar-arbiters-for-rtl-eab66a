// tb_starvation -- the starvation guard against an unlucky blocking pattern.
//
// All four crosspoints of 2 x 2 arbiters are requested every cycle. Output 0
// is blocked in a period-4 rhythm (WFA: cycles 0 and 3 of every 4; WWFA:
// every even cycle), chosen so that output 0 is always blocked when queue
// (0,0) holds the priority. In the other cycles a competing crosspoint is
// ahead of (0,0) in its row or its column. With plain rotation, queue (0,0)
// is therefore never served while the other queues are. With the guard,
// the priority stays on (0,0) until output 0 is free again. The test
// requires: no grant to (0,0) without the guard, grants to (0,0) with it, a
// wait of at most 2n^2 cycles between them (other queues' guarded turns can
// delay it), and grants to the other queues under both arbiters.
module tb_starvation;
  localparam int N = 2;
  localparam int CYC = 400;
  logic clk = 0, rst_n = 0;
  logic [N-1:0][N-1:0] req;
  logic [N-1:0] opb_f, opb_w;
  logic [N-1:0][N-1:0] gf0, gf1, gw0, gw1;
  logic [N-1:0] tc0, tr0, tc1, tr1, td0, td1;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  wfa_arbiter  #(.N(N), .HOLD_PRIORITY(1'b0)) f0 (.clk, .rst_n, .req, .opb(opb_f), .grant(gf0), .top_col(tc0), .top_row(tr0));
  wfa_arbiter  #(.N(N), .HOLD_PRIORITY(1'b1)) f1 (.clk, .rst_n, .req, .opb(opb_f), .grant(gf1), .top_col(tc1), .top_row(tr1));
  wwfa_arbiter #(.N(N), .HOLD_PRIORITY(1'b0)) w0 (.clk, .rst_n, .req, .opb(opb_w), .grant(gw0), .top_diag(td0));
  wwfa_arbiter #(.N(N), .HOLD_PRIORITY(1'b1)) w1 (.clk, .rst_n, .req, .opb(opb_w), .grant(gw1), .top_diag(td1));

  task automatic require(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int served[4], others[4], last[4], worst[4];
    for (int k = 0; k < 4; k++) begin served[k] = 0; others[k] = 0; last[k] = 0; worst[k] = 0; end
    req = '1;
    opb_f = '0;
    opb_w = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < CYC; c++) begin
      logic [N-1:0][N-1:0] g[4];
      opb_f[0] = (c % 4 == 0) || (c % 4 == 3);
      opb_w[0] = (c % 2 == 0);
      #1;
      g[0] = gf0; g[1] = gf1; g[2] = gw0; g[3] = gw1;
      for (int k = 0; k < 4; k++) begin
        if (g[k][0][0]) begin
          served[k]++;
          if (c - last[k] > worst[k]) worst[k] = c - last[k];
          last[k] = c;
        end
        if (g[k][0][1] || g[k][1][0] || g[k][1][1]) others[k]++;
      end
      @(negedge clk);
    end
    $display("queue (0,0) served: WFA %0d, WFA guarded %0d, WWFA %0d, WWFA guarded %0d",
             served[0], served[1], served[2], served[3]);
    $display("longest wait with guard: WFA %0d, WWFA %0d cycles", worst[1], worst[3]);
    require(served[0] == 0, "plain WFA served the unlucky queue");
    require(served[2] == 0, "plain WWFA served the unlucky queue");
    require(served[1] > CYC / 8, "guarded WFA starved the queue");
    require(served[3] > CYC / 8, "guarded WWFA starved the queue");
    require(worst[1] <= 2 * N * N && worst[3] <= 2 * N * N, "guarded wait longer than 2n^2 cycles");
    for (int k = 0; k < 4; k++) require(others[k] > CYC / 4, "other queues not served");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (CYC + 100) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
