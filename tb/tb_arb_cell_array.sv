// tb_arb_cell_array -- test of the wrapped array of arbitration cells.
//
// Drives random request and blocked-port patterns together with the two
// kinds of priority pattern the arbiters use: one whole priority column and
// one whole priority row (wave front), and one wrapped diagonal (wrapped wave
// front). Every grant matrix is compared with the sequential wave models of
// tb_arb_ref_pkg and checked to be legal (one grant per row and column) and
// maximal. Two sizes are tested, 4 x 4 and 3 x 3. A worked 4 x 4 example
// with known grants for both kinds of priority comes first.
module tb_arb_cell_array;
  import tb_arb_ref_pkg::*;

  localparam int N = 4;
  localparam int N3 = 3;

  logic [N-1:0][N-1:0] req, xp, yp, grant;
  logic [N-1:0]        opb;
  logic [N3-1:0][N3-1:0] req3, xp3, yp3, grant3;
  logic [N3-1:0]         opb3;
  int checks = 0, failures = 0;

  arb_cell_array #(.N(N))  dut  (.req, .opb, .xp, .yp, .grant);
  arb_cell_array #(.N(N3)) dut3 (.req(req3), .opb(opb3), .xp(xp3), .yp(yp3), .grant(grant3));

  task automatic check_mat(string what, mat_t got, mat_t exp, mat_t rq, logic [7:0] ob, int n);
    checks += 3;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: req=%h opb=%b grant=%h expected %h", what, rq, ob, got, exp);
    end
    if (!is_legal(got, n)) begin failures++; $display("FAIL %s: illegal grant", what); end
    if (!is_maximal(rq, got, ob, n)) begin failures++; $display("FAIL %s: not maximal", what); end
  endtask

  // Worked example (0-based): requests at (0,2) (0,3) (1,0) (1,2) (2,0) (2,1)
  // (2,3) (3,1) (3,3), no port blocked. Wave front from (0,0) grants (0,2)
  // (1,0) (2,1) (3,3); wrapped wave front from diagonal 0 grants (0,2) (1,0)
  // (2,3) (3,1).
  task automatic worked_example();
    logic [N-1:0][N-1:0] exp_wfa, exp_wwfa;
    req = '0; opb = '0; exp_wfa = '0; exp_wwfa = '0;
    req[0][2] = 1; req[0][3] = 1; req[1][0] = 1; req[1][2] = 1; req[2][0] = 1;
    req[2][1] = 1; req[2][3] = 1; req[3][1] = 1; req[3][3] = 1;
    exp_wfa[0][2] = 1; exp_wfa[1][0] = 1; exp_wfa[2][1] = 1; exp_wfa[3][3] = 1;
    exp_wwfa[0][2] = 1; exp_wwfa[1][0] = 1; exp_wwfa[2][3] = 1; exp_wwfa[3][1] = 1;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        xp[i][j] = (j == 0);
        yp[i][j] = (i == 0);
      end
    #1;
    checks++;
    if (grant !== exp_wfa) begin failures++; $display("FAIL worked example WFA: %h", grant); end
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        xp[i][j] = ((i + j) % N) == 0;
        yp[i][j] = ((i + j) % N) == 0;
      end
    #1;
    checks++;
    if (grant !== exp_wwfa) begin failures++; $display("FAIL worked example WWFA: %h", grant); end
  endtask

  initial begin
    worked_example();
    for (int t = 0; t < 3000; t++) begin
      int tr, tc, k, density;
      density = 1 + $urandom % 4;   // request probability density/4
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) req[i][j] = ($urandom % 4) < density;
      for (int j = 0; j < N; j++) opb[j] = ($urandom % 5) == 0;
      if (t % 2 == 0) begin
        tr = $urandom % N; tc = $urandom % N;
        for (int i = 0; i < N; i++)
          for (int j = 0; j < N; j++) begin
            xp[i][j] = (j == tc);
            yp[i][j] = (i == tr);
          end
        #1;
        check_mat("wfa4", mat_t'(grant), ref_wfa(mat_t'(req), 8'(opb), N, tr, tc),
                  mat_t'(req), 8'(opb), N);
      end else begin
        k = $urandom % N;
        for (int i = 0; i < N; i++)
          for (int j = 0; j < N; j++) begin
            xp[i][j] = ((i + j) % N) == k;
            yp[i][j] = ((i + j) % N) == k;
          end
        #1;
        check_mat("wwfa4", mat_t'(grant), ref_wwfa(mat_t'(req), 8'(opb), N, k),
                  mat_t'(req), 8'(opb), N);
      end
      // 3 x 3 instance
      for (int i = 0; i < N3; i++)
        for (int j = 0; j < N3; j++) req3[i][j] = ($urandom % 4) < density;
      for (int j = 0; j < N3; j++) opb3[j] = ($urandom % 5) == 0;
      k = $urandom % N3; tr = $urandom % N3; tc = $urandom % N3;
      for (int i = 0; i < N3; i++)
        for (int j = 0; j < N3; j++) begin
          xp3[i][j] = (t % 2 == 0) ? (j == tc) : (((i + j) % N3) == k);
          yp3[i][j] = (t % 2 == 0) ? (i == tr) : (((i + j) % N3) == k);
        end
      #1;
      check_mat("n3", mat_t'(grant3),
                (t % 2 == 0) ? ref_wfa(mat_t'(req3), 8'(opb3), N3, tr, tc)
                             : ref_wwfa(mat_t'(req3), 8'(opb3), N3, k),
                mat_t'(req3), 8'(opb3), N3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
