// tb_switch_traffic -- traffic generator and checker for one crossbar switch.
//
// Models the surroundings of the switch for a testbench:
//  * n multi-queue input buffers. Each holds at most SLOTS packets in all,
//    shared dynamically among n per-output FIFO queues. Every cycle each
//    source offers a packet with probability LOAD_PCT percent to a uniformly
//    random output; it is refused when the buffer is full.
//  * n downstream buffers of DOWN_SLOTS packets, one per output port, each
//    draining one packet per cycle with probability DRAIN_PCT percent. A full
//    downstream buffer asserts that port's OPB line.
// A packet's data word is {source, sequence number}. Per cycle the checker
// raises req[i][j] for every non-empty queue, reads the grants (same cycle),
// puts the head of each granted queue on in_data, and checks that:
// grants are legal (one per row and column, only requested, unblocked
// crosspoints) and maximal; each output carries exactly the head packet of the
// granted queue and nothing when ungranted; per-queue order is kept.
// After CYCLES cycles arrivals stop and the switch must drain every packet.
// Counts of multi-grant cycles, full-permutation cycles, blocked requests,
// refused arrivals and cycles with priority kept (prio_kept input) are
// reported for the enclosing testbench to judge, with the sum and maximum of
// the packet latencies: cycles from the cycle after arrival in the input
// buffer to the cycle of transfer through the crossbar, inclusive, so a
// packet that finds its path free has latency 1.
module tb_switch_traffic
  import tb_arb_ref_pkg::*;
#(
  parameter int N          = 4,
  parameter int D          = 8,
  parameter int SLOTS      = 4,
  parameter int DOWN_SLOTS = 4,
  parameter int LOAD_PCT   = 80,
  parameter int DRAIN_PCT  = 70,
  parameter int CYCLES     = 3000,
  parameter string NAME    = "switch"
) (
  input  logic                clk,
  input  logic                rst_n,
  output logic [N-1:0][N-1:0] req,
  output logic [N-1:0]        opb,
  output logic [N-1:0][D-1:0] in_data,
  input  logic [N-1:0][N-1:0] grant,
  input  logic [N-1:0][D-1:0] out_data,
  input  logic                prio_kept,
  output logic                done,
  output int                  checks,
  output int                  failures,
  output int                  n_multi,
  output int                  n_full,
  output int                  n_blocked,
  output int                  n_refused,
  output int                  n_kept,
  output int                  n_delivered,
  output longint              lat_sum,
  output int                  lat_max
);
  localparam int SB = (N > 1) ? $clog2(N) : 1;
  localparam int QB = D - SB;

  logic [D-1:0] q[N][N][$];
  int occ[N], down[N];
  int seq_in[N][N], seq_out[N][N];
  int injected, cyc;
  int t_in[N][N][$];

  task automatic fail(string msg);
    failures++;
    $display("FAIL %s: %s at %0t", NAME, msg, $time);
  endtask

  task automatic one_cycle(bit arrivals);
    mat_t g;
    @(negedge clk);
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) req[i][j] = q[i][j].size() != 0;
    for (int j = 0; j < N; j++) opb[j] = down[j] == DOWN_SLOTS;
    if ((req & {N{opb}}) != '0) n_blocked++;
    #1;
    g = mat_t'(grant);
    checks += 3;
    if (!is_legal(g, N)) fail("two grants in a row or column");
    if ((grant & ~req) != '0 || (grant & {N{opb}}) != '0)
      fail("grant to an unrequested or blocked crosspoint");
    if (!is_maximal(mat_t'(req), g, 8'(opb), N)) fail("grant set not maximal");
    if (popcount(g) > 1) n_multi++;
    if (popcount(g) == N) n_full++;
    for (int i = 0; i < N; i++) begin
      in_data[i] = '0;
      for (int j = 0; j < N; j++)
        if (grant[i][j]) in_data[i] = q[i][j][0];
    end
    #1;
    for (int j = 0; j < N; j++) begin
      logic [D-1:0] exp = '0;
      int src = -1;
      for (int i = 0; i < N; i++) if (grant[i][j]) begin exp = q[i][j][0]; src = i; end
      checks++;
      if (out_data[j] !== exp) fail($sformatf("output %0d carries %h, expected %h", j, out_data[j], exp));
      if (src >= 0) begin
        checks++;
        if (out_data[j] !== {SB'(src), QB'(seq_out[src][j])})
          fail($sformatf("output %0d packet out of order", j));
        seq_out[src][j]++;
        void'(q[src][j].pop_front());
        begin
          int lat = cyc - t_in[src][j].pop_front() + 1;
          lat_sum += longint'(lat);
          if (lat > lat_max) lat_max = lat;
        end
        occ[src]--;
        down[j]++;
        n_delivered++;
      end
    end
    if (prio_kept) n_kept++;
    for (int j = 0; j < N; j++)
      if (down[j] > 0 && ($urandom % 100) < DRAIN_PCT) down[j]--;
    cyc++;
    if (arrivals)
      for (int i = 0; i < N; i++)
        if (($urandom % 100) < LOAD_PCT) begin
          int j = $urandom % N;
          if (occ[i] < SLOTS) begin
            q[i][j].push_back({SB'(i), QB'(seq_in[i][j])});
            t_in[i][j].push_back(cyc);
            seq_in[i][j]++;
            occ[i]++;
            injected++;
          end else n_refused++;
        end
  endtask

  initial begin
    done = 0; checks = 0; failures = 0;
    n_multi = 0; n_full = 0; n_blocked = 0; n_refused = 0; n_kept = 0; n_delivered = 0;
    injected = 0; cyc = 0; lat_sum = 0; lat_max = 0;
    req = '0; opb = '0; in_data = '0;
    for (int i = 0; i < N; i++) begin
      occ[i] = 0; down[i] = 0;
      for (int j = 0; j < N; j++) begin seq_in[i][j] = 0; seq_out[i][j] = 0; end
    end
    @(posedge rst_n);
    for (int c = 0; c < CYCLES; c++) one_cycle(1);
    for (int c = 0; c < 50 * N * SLOTS; c++) one_cycle(0);
    checks++;
    if (n_delivered != injected)
      fail($sformatf("%0d packets injected, %0d delivered", injected, n_delivered));
    $display("%s: injected=%0d delivered=%0d multi=%0d full=%0d blocked=%0d refused=%0d kept=%0d",
             NAME, injected, n_delivered, n_multi, n_full, n_blocked, n_refused, n_kept);
    $display("%s: mean latency %0.2f cycles, max %0d cycles", NAME,
             real'(lat_sum) / (n_delivered > 0 ? n_delivered : 1), lat_max);
    done = 1;
  end
endmodule
