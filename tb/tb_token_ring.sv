// tb_token_ring -- test of the priority token ring.
//
// Checks the reset state (token in stage 0), then drives a random advance
// pattern for a few hundred cycles and compares tok and wrap every cycle
// with a counter modulo N kept by the testbench. Also counts the laps and
// checks that a ring left alone keeps its token.
module tb_token_ring;
  localparam int N = 4;
  logic clk = 0, rst_n = 0, advance = 0, wrap;
  logic [N-1:0] tok;
  int checks = 0, failures = 0, pos = 0, laps = 0, holds = 0;

  token_ring #(.N(N)) dut (.clk, .rst_n, .advance, .tok, .wrap);

  always #5 clk = ~clk;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    check("reset token", 32'(tok), 32'd1);
    rst_n = 1;
    for (int c = 0; c < 400; c++) begin
      @(negedge clk);
      advance = ($urandom % 4) != 0;
      #1;
      check("tok", 32'(tok), 32'(1) << pos);
      check("wrap", 32'(wrap), 32'(advance && pos == N - 1));
      @(posedge clk);
      if (advance) begin
        if (pos == N - 1) laps++;
        pos = (pos + 1) % N;
      end else holds++;
    end
    checks++;
    if (laps < 10 || holds < 10) begin failures++; $display("FAIL too few laps/holds"); end
    $display("laps=%0d holds=%0d", laps, holds);
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
