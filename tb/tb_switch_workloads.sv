// tb_switch_workloads -- single-switch runs at the evaluated configurations.
//
// Saturated traffic (every source offers a packet every cycle, uniform
// destinations, output ports never blocked) through single switches with
// multi-queue input buffers: 4 x 4 with four packet slots per input under
// both arbiters, 4 x 4 with two and six slots, and 2 x 2 and 8 x 8 with four
// slots, all with the wave front arbiter unless named. Every cycle is checked
// by tb_switch_traffic; the run prints the normalized throughput (packets per
// output per cycle) and mean latency of each, and checks the expected trend
// that more buffer slots give a higher saturation throughput.
module tb_switch_workloads;
  import xbar_pkg::*;

  localparam int K = 6;
  localparam int CYC = 20000;
  localparam int NS[K] = '{4, 4, 4, 4, 2, 8};
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic done[K];
  int checks[K], failures[K], n_multi[K], n_full[K], n_blocked[K], n_refused[K],
      n_kept[K], n_delivered[K], lat_max[K];
  longint lat_sum[K];

  logic [3:0][3:0] req0, gnt0, req1, gnt1, req2, gnt2, req3, gnt3;
  logic [3:0] opb0, opb1, opb2, opb3;
  logic [3:0][7:0] in0, out0, in1, out1, in2, out2, in3, out3;
  logic [1:0][1:0] req4, gnt4;  logic [1:0] opb4;  logic [1:0][7:0] in4, out4;
  logic [7:0][7:0] req5, gnt5;  logic [7:0] opb5;  logic [7:0][7:0] in5, out5;

  xbar_switch #(.N(4), .SCHEME(ARB_WFA))  s0 (.clk, .rst_n, .req(req0), .opb(opb0), .grant(gnt0), .in_data(in0), .out_data(out0));
  xbar_switch #(.N(4), .SCHEME(ARB_WWFA)) s1 (.clk, .rst_n, .req(req1), .opb(opb1), .grant(gnt1), .in_data(in1), .out_data(out1));
  xbar_switch #(.N(4), .SCHEME(ARB_WFA))  s2 (.clk, .rst_n, .req(req2), .opb(opb2), .grant(gnt2), .in_data(in2), .out_data(out2));
  xbar_switch #(.N(4), .SCHEME(ARB_WFA))  s3 (.clk, .rst_n, .req(req3), .opb(opb3), .grant(gnt3), .in_data(in3), .out_data(out3));
  xbar_switch #(.N(2), .SCHEME(ARB_WFA))  s4 (.clk, .rst_n, .req(req4), .opb(opb4), .grant(gnt4), .in_data(in4), .out_data(out4));
  xbar_switch #(.N(8), .SCHEME(ARB_WFA))  s5 (.clk, .rst_n, .req(req5), .opb(opb5), .grant(gnt5), .in_data(in5), .out_data(out5));

  tb_switch_traffic #(.N(4), .SLOTS(4), .LOAD_PCT(100), .DRAIN_PCT(100), .CYCLES(CYC), .NAME("4x4 WFA 4 slots")) t0 (
    .clk, .rst_n, .req(req0), .opb(opb0), .in_data(in0), .grant(gnt0), .out_data(out0), .prio_kept(1'b0),
    .done(done[0]), .checks(checks[0]), .failures(failures[0]), .n_multi(n_multi[0]), .n_full(n_full[0]),
    .n_blocked(n_blocked[0]), .n_refused(n_refused[0]), .n_kept(n_kept[0]), .n_delivered(n_delivered[0]),
    .lat_sum(lat_sum[0]), .lat_max(lat_max[0]));
  tb_switch_traffic #(.N(4), .SLOTS(4), .LOAD_PCT(100), .DRAIN_PCT(100), .CYCLES(CYC), .NAME("4x4 WWFA 4 slots")) t1 (
    .clk, .rst_n, .req(req1), .opb(opb1), .in_data(in1), .grant(gnt1), .out_data(out1), .prio_kept(1'b0),
    .done(done[1]), .checks(checks[1]), .failures(failures[1]), .n_multi(n_multi[1]), .n_full(n_full[1]),
    .n_blocked(n_blocked[1]), .n_refused(n_refused[1]), .n_kept(n_kept[1]), .n_delivered(n_delivered[1]),
    .lat_sum(lat_sum[1]), .lat_max(lat_max[1]));
  tb_switch_traffic #(.N(4), .SLOTS(2), .LOAD_PCT(100), .DRAIN_PCT(100), .CYCLES(CYC), .NAME("4x4 WFA 2 slots")) t2 (
    .clk, .rst_n, .req(req2), .opb(opb2), .in_data(in2), .grant(gnt2), .out_data(out2), .prio_kept(1'b0),
    .done(done[2]), .checks(checks[2]), .failures(failures[2]), .n_multi(n_multi[2]), .n_full(n_full[2]),
    .n_blocked(n_blocked[2]), .n_refused(n_refused[2]), .n_kept(n_kept[2]), .n_delivered(n_delivered[2]),
    .lat_sum(lat_sum[2]), .lat_max(lat_max[2]));
  tb_switch_traffic #(.N(4), .SLOTS(6), .LOAD_PCT(100), .DRAIN_PCT(100), .CYCLES(CYC), .NAME("4x4 WFA 6 slots")) t3 (
    .clk, .rst_n, .req(req3), .opb(opb3), .in_data(in3), .grant(gnt3), .out_data(out3), .prio_kept(1'b0),
    .done(done[3]), .checks(checks[3]), .failures(failures[3]), .n_multi(n_multi[3]), .n_full(n_full[3]),
    .n_blocked(n_blocked[3]), .n_refused(n_refused[3]), .n_kept(n_kept[3]), .n_delivered(n_delivered[3]),
    .lat_sum(lat_sum[3]), .lat_max(lat_max[3]));
  tb_switch_traffic #(.N(2), .SLOTS(4), .LOAD_PCT(100), .DRAIN_PCT(100), .CYCLES(CYC), .NAME("2x2 WFA 4 slots")) t4 (
    .clk, .rst_n, .req(req4), .opb(opb4), .in_data(in4), .grant(gnt4), .out_data(out4), .prio_kept(1'b0),
    .done(done[4]), .checks(checks[4]), .failures(failures[4]), .n_multi(n_multi[4]), .n_full(n_full[4]),
    .n_blocked(n_blocked[4]), .n_refused(n_refused[4]), .n_kept(n_kept[4]), .n_delivered(n_delivered[4]),
    .lat_sum(lat_sum[4]), .lat_max(lat_max[4]));
  tb_switch_traffic #(.N(8), .SLOTS(4), .LOAD_PCT(100), .DRAIN_PCT(100), .CYCLES(CYC), .NAME("8x8 WFA 4 slots")) t5 (
    .clk, .rst_n, .req(req5), .opb(opb5), .in_data(in5), .grant(gnt5), .out_data(out5), .prio_kept(1'b0),
    .done(done[5]), .checks(checks[5]), .failures(failures[5]), .n_multi(n_multi[5]), .n_full(n_full[5]),
    .n_blocked(n_blocked[5]), .n_refused(n_refused[5]), .n_kept(n_kept[5]), .n_delivered(n_delivered[5]),
    .lat_sum(lat_sum[5]), .lat_max(lat_max[5]));

  initial begin
    int tc, tf;
    real thr[K];
    tc = 0;
    tf = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (done[0] && done[1] && done[2] && done[3] && done[4] && done[5]);
    for (int k = 0; k < K; k++) begin
      tc += checks[k];
      tf += failures[k];
      // Normalized by the loaded cycles; the at most n*slots packets
      // delivered while draining add well under 1%.
      thr[k] = real'(n_delivered[k]) / (NS[k] * CYC);
      $display("config %0d: normalized throughput %0.3f, mean latency %0.2f cycles",
               k, thr[k], real'(lat_sum[k]) / n_delivered[k]);
    end
    tc++;
    if (!(thr[3] > thr[0] && thr[0] > thr[2])) begin
      tf++;
      $display("FAIL throughput does not grow with buffer size");
    end
    $display("TB_RESULT checks=%0d failures=%0d", tc, tf);
    $finish;
  end

  initial begin
    repeat (CYC + 5000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end
endmodule
