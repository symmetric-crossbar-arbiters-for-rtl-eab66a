// tb_static_throughput -- measured throughput of 2 x 2 arbiters against the
// closed-form static analysis.
//
// Each cycle every crosspoint of a 2 x 2 arbiter is requested independently
// with probability p, no port is blocked, and the normalized throughput
// (grants per cycle / n) is averaged over many cycles. For the wave front
// arbiter the expected value is 2p - 2p^2 + (3/2)p^3 - (1/2)p^4; for the
// wrapped wave front arbiter it is 2p - 2p^2 + p^3. The rotating priority
// does not change these values because a 2 x 2 array is symmetric under it.
// Checked at p = 0.25, 0.5, 0.75 and 1 within a statistical tolerance.
module tb_static_throughput;
  localparam int N = 2;
  localparam int CYC = 40000;
  logic clk = 0, rst_n = 0;
  logic [N-1:0][N-1:0] req, gw, gww;
  logic [N-1:0] tc, tr, td;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  wfa_arbiter #(.N(N)) u_wfa (.clk, .rst_n, .req, .opb('0), .grant(gw),
                              .top_col(tc), .top_row(tr));
  wwfa_arbiter #(.N(N)) u_wwfa (.clk, .rst_n, .req, .opb('0), .grant(gww),
                                .top_diag(td));

  function automatic int ones(logic [N-1:0][N-1:0] m);
    int c = 0;
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) c += m[i][j];
    return c;
  endfunction

  initial begin
    real p, tw, tww, ew, eww;
    int sw, sww, pk;
    req = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 1; k <= 4; k++) begin
      pk = 25 * k;
      p = pk / 100.0;
      sw = 0; sww = 0;
      for (int c = 0; c < CYC; c++) begin
        @(negedge clk);
        for (int i = 0; i < N; i++)
          for (int j = 0; j < N; j++) req[i][j] = ($urandom % 100) < pk;
        #1;
        sw += ones(gw);
        sww += ones(gww);
      end
      tw  = real'(sw)  / (N * CYC);
      tww = real'(sww) / (N * CYC);
      ew  = 2*p - 2*p*p + 1.5*p*p*p - 0.5*p*p*p*p;
      eww = 2*p - 2*p*p + p*p*p;
      $display("p=%0.2f  WFA %0.4f (analysis %0.4f)  WWFA %0.4f (analysis %0.4f)",
               p, tw, ew, tww, eww);
      checks += 2;
      if (tw - ew > 0.012 || ew - tw > 0.012) begin failures++; $display("FAIL WFA throughput"); end
      if (tww - eww > 0.012 || eww - tww > 0.012) begin failures++; $display("FAIL WWFA throughput"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4 * CYC + 1000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
