// crossbar -- n x n crossbar of d-bit buses.
//
// n horizontal buses (rows) come from the input buffers and n vertical
// buses (columns) go to the output ports. Control line ctrl[i][j] closes the
// crosspoint joining row i to column j. The arbiter guarantees at most one
// closed crosspoint per column; this model ORs the rows gated onto a column,
// so a column with no closed crosspoint reads 0. The crossbar's function
// (a switch at each crosspoint, closed by its control line) follows the
// published design; writing each switch as AND-OR gating is this
// implementation's choice.
//
// Interface: in_data[i] is row i, out_data[j] is column j, ctrl packed
// [row][col]. Timing: purely combinational.
module crossbar #(
  parameter int unsigned N = 4,
  parameter int unsigned D = 8
) (
  input  logic [N-1:0][D-1:0] in_data,
  input  logic [N-1:0][N-1:0] ctrl,
  output logic [N-1:0][D-1:0] out_data
);

  always_comb begin
    out_data = '0;
    for (int j = 0; j < N; j++) begin
      for (int i = 0; i < N; i++) begin
        out_data[j] |= in_data[i] & {D{ctrl[i][j]}};
      end
    end
  end

endmodule
