// tb_xbar_switch -- end-to-end test of the crossbar switch.
//
// Runs the traffic model of tb_switch_traffic (multi-queue input buffers,
// flow-controlled downstream buffers) against four switches: wave front and
// wrapped wave front arbitration, each without and with the starvation
// guard, plus an 8 x 8 wave front switch. Besides the per-cycle checks of the
// traffic model it requires that every mechanism happened: several
// connections in one cycle, a full permutation, requests held off by a
// blocked output port, refused arrivals at a full buffer, and, for the
// guarded switches, cycles in which the priority was kept.
module tb_xbar_switch;
  import xbar_pkg::*;

  localparam int K = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic done[K];
  int checks[K], failures[K], n_multi[K], n_full[K], n_blocked[K], n_refused[K],
      n_kept[K], n_delivered[K], lat_max[K];
  longint lat_sum[K];
  logic kept[K];

  // Switch 0: default parameters written out.
  logic [3:0][3:0] req0, gnt0;  logic [3:0] opb0;  logic [3:0][7:0] in0, out0;
  xbar_switch #(.N(4), .D(8), .SCHEME(ARB_WFA), .HOLD_PRIORITY(1'b0)) dut0 (
    .clk, .rst_n, .req(req0), .opb(opb0), .grant(gnt0), .in_data(in0), .out_data(out0));
  logic [3:0][3:0] req1, gnt1;  logic [3:0] opb1;  logic [3:0][7:0] in1, out1;
  xbar_switch #(.N(4), .D(8), .SCHEME(ARB_WFA), .HOLD_PRIORITY(1'b1)) dut1 (
    .clk, .rst_n, .req(req1), .opb(opb1), .grant(gnt1), .in_data(in1), .out_data(out1));
  logic [3:0][3:0] req2, gnt2;  logic [3:0] opb2;  logic [3:0][7:0] in2, out2;
  xbar_switch #(.N(4), .D(8), .SCHEME(ARB_WWFA), .HOLD_PRIORITY(1'b0)) dut2 (
    .clk, .rst_n, .req(req2), .opb(opb2), .grant(gnt2), .in_data(in2), .out_data(out2));
  logic [3:0][3:0] req3, gnt3;  logic [3:0] opb3;  logic [3:0][7:0] in3, out3;
  xbar_switch #(.N(4), .D(8), .SCHEME(ARB_WWFA), .HOLD_PRIORITY(1'b1)) dut3 (
    .clk, .rst_n, .req(req3), .opb(opb3), .grant(gnt3), .in_data(in3), .out_data(out3));
  logic [7:0][7:0] req4, gnt4;  logic [7:0] opb4;  logic [7:0][7:0] in4, out4;
  xbar_switch #(.N(8), .D(8), .SCHEME(ARB_WFA), .HOLD_PRIORITY(1'b1)) dut4 (
    .clk, .rst_n, .req(req4), .opb(opb4), .grant(gnt4), .in_data(in4), .out_data(out4));

  // Sampled just before the clock edge: will the ring hold at this edge?
  assign kept[0] = !dut0.g_wfa.u_arb.x_advance;
  assign kept[1] = !dut1.g_wfa.u_arb.x_advance;
  assign kept[2] = !dut2.g_wwfa.u_arb.advance;
  assign kept[3] = !dut3.g_wwfa.u_arb.advance;
  assign kept[4] = !dut4.g_wfa.u_arb.x_advance;

  tb_switch_traffic #(.N(4), .D(8), .NAME("wfa")) t0 (
    .clk, .rst_n, .req(req0), .opb(opb0), .in_data(in0), .grant(gnt0), .out_data(out0),
    .prio_kept(kept[0]), .done(done[0]), .checks(checks[0]), .failures(failures[0]),
    .n_multi(n_multi[0]), .n_full(n_full[0]), .n_blocked(n_blocked[0]),
    .n_refused(n_refused[0]), .n_kept(n_kept[0]), .n_delivered(n_delivered[0]),
    .lat_sum(lat_sum[0]), .lat_max(lat_max[0]));
  tb_switch_traffic #(.N(4), .D(8), .NAME("wfa_hold")) t1 (
    .clk, .rst_n, .req(req1), .opb(opb1), .in_data(in1), .grant(gnt1), .out_data(out1),
    .prio_kept(kept[1]), .done(done[1]), .checks(checks[1]), .failures(failures[1]),
    .n_multi(n_multi[1]), .n_full(n_full[1]), .n_blocked(n_blocked[1]),
    .n_refused(n_refused[1]), .n_kept(n_kept[1]), .n_delivered(n_delivered[1]),
    .lat_sum(lat_sum[1]), .lat_max(lat_max[1]));
  tb_switch_traffic #(.N(4), .D(8), .NAME("wwfa")) t2 (
    .clk, .rst_n, .req(req2), .opb(opb2), .in_data(in2), .grant(gnt2), .out_data(out2),
    .prio_kept(kept[2]), .done(done[2]), .checks(checks[2]), .failures(failures[2]),
    .n_multi(n_multi[2]), .n_full(n_full[2]), .n_blocked(n_blocked[2]),
    .n_refused(n_refused[2]), .n_kept(n_kept[2]), .n_delivered(n_delivered[2]),
    .lat_sum(lat_sum[2]), .lat_max(lat_max[2]));
  tb_switch_traffic #(.N(4), .D(8), .NAME("wwfa_hold")) t3 (
    .clk, .rst_n, .req(req3), .opb(opb3), .in_data(in3), .grant(gnt3), .out_data(out3),
    .prio_kept(kept[3]), .done(done[3]), .checks(checks[3]), .failures(failures[3]),
    .n_multi(n_multi[3]), .n_full(n_full[3]), .n_blocked(n_blocked[3]),
    .n_refused(n_refused[3]), .n_kept(n_kept[3]), .n_delivered(n_delivered[3]),
    .lat_sum(lat_sum[3]), .lat_max(lat_max[3]));
  tb_switch_traffic #(.N(8), .D(8), .NAME("wfa8_hold")) t4 (
    .clk, .rst_n, .req(req4), .opb(opb4), .in_data(in4), .grant(gnt4), .out_data(out4),
    .prio_kept(kept[4]), .done(done[4]), .checks(checks[4]), .failures(failures[4]),
    .n_multi(n_multi[4]), .n_full(n_full[4]), .n_blocked(n_blocked[4]),
    .n_refused(n_refused[4]), .n_kept(n_kept[4]), .n_delivered(n_delivered[4]),
    .lat_sum(lat_sum[4]), .lat_max(lat_max[4]));

  int total_checks, total_failures;

  task automatic need(bit cond, string what);
    total_checks++;
    if (!cond) begin
      total_failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  initial begin
    total_checks = 0; total_failures = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (done[0] && done[1] && done[2] && done[3] && done[4]);
    for (int k = 0; k < K; k++) begin
      total_checks += checks[k];
      total_failures += failures[k];
      need(n_multi[k] > 0, $sformatf("switch %0d multi-grant", k));
      need(n_full[k] > 0, $sformatf("switch %0d full permutation", k));
      need(n_blocked[k] > 0, $sformatf("switch %0d blocked output", k));
      need(n_refused[k] > 0, $sformatf("switch %0d full input buffer", k));
      need(n_delivered[k] > 100, $sformatf("switch %0d deliveries", k));
    end
    need(n_kept[0] == 0 && n_kept[2] == 0, "plain arbiters never hold");
    need(n_kept[1] > 0, "WFA starvation guard held priority");
    need(n_kept[3] > 0, "WWFA starvation guard held priority");
    need(n_kept[4] > 0, "8x8 WFA starvation guard held priority");
    $display("TB_RESULT checks=%0d failures=%0d", total_checks, total_failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", total_checks, total_failures + 1);
    $finish;
  end
endmodule
