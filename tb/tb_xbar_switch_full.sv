// tb_xbar_switch_full -- the crossbar switch at its default size.
//
// The switch is instantiated with no parameter overrides: a 4 x 4 crossbar of
// 8-bit buses with the wave front arbiter. The traffic model of
// tb_switch_traffic runs 20000 cycles of random traffic from four-slot
// multi-queue input buffers into flow-controlled outputs, then drains the
// switch, checking every grant set and every transferred data word. It also
// requires multi-connection cycles, full permutations and blocked outputs to
// have occurred.
module tb_xbar_switch_full;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [3:0][3:0] req, grant;
  logic [3:0]      opb;
  logic [3:0][7:0] in_data, out_data;
  logic            done;
  int checks, failures, n_multi, n_full, n_blocked, n_refused, n_kept, n_delivered, lat_max;
  longint lat_sum;

  xbar_switch dut (.clk, .rst_n, .req, .opb, .grant, .in_data, .out_data);

  tb_switch_traffic #(.N(4), .D(8), .CYCLES(20000), .NAME("default switch")) traffic (
    .clk, .rst_n, .req, .opb, .in_data, .grant, .out_data, .prio_kept(1'b0),
    .done, .checks, .failures, .n_multi, .n_full, .n_blocked, .n_refused,
    .n_kept, .n_delivered, .lat_sum, .lat_max);

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (done);
    checks += 3;
    if (n_multi == 0 || n_full == 0 || n_blocked == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    if (n_delivered < 1000) failures++;
    if (lat_max < 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
