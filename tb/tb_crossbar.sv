// tb_crossbar -- test of the n x n crossbar of d-bit buses.
//
// Random data on every row and random legal crosspoint settings (at most one
// closed crosspoint per column, as the arbiter guarantees; rows may feed
// several columns). Each output column must carry the data of the row whose
// crosspoint is closed, or 0 when none is.
module tb_crossbar;
  localparam int N = 4, D = 8;
  logic [N-1:0][D-1:0] in_data, out_data;
  logic [N-1:0][N-1:0] ctrl;
  int checks = 0, failures = 0;

  crossbar #(.N(N), .D(D)) dut (.in_data, .ctrl, .out_data);

  initial begin
    for (int t = 0; t < 1000; t++) begin
      int src[N];
      ctrl = '0;
      for (int i = 0; i < N; i++) in_data[i] = D'($urandom);
      for (int j = 0; j < N; j++) begin
        src[j] = $urandom % (N + 1);   // N means: column left open
        if (src[j] < N) ctrl[src[j]][j] = 1'b1;
      end
      #1;
      for (int j = 0; j < N; j++) begin
        logic [D-1:0] exp;
        exp = (src[j] < N) ? in_data[src[j]] : '0;
        checks++;
        if (out_data[j] !== exp) begin
          failures++;
          $display("FAIL col %0d: got %h expected %h (src %0d)", j, out_data[j], exp, src[j]);
        end
      end
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
