// arb_cell_array -- n x n array of arbitration cells with wrapped row and
// column chains.
//
// Cell (i,j) arbitrates crosspoint (input i, output j). In the published
// arrays the XO output of the last cell of each row feeds XI of the first
// cell of that row, and YO of the bottom cell of each column feeds YI of the
// top cell, so the arbitration wave can start anywhere. Those wraps are
// combinational rings; they never oscillate because the XP/YP priority inputs
// override XI/YI at the wave's starting cells, but as written they are loops
// that synthesis, timing analysis and cycle-based simulation cannot handle.
//
// This implementation removes the loops by unrolling: it builds a 2n x 2n
// grid of the same cells whose west and north boundary inputs are 0, gives
// grid cell (a,b) the request, OPB and priority inputs of array cell
// (a mod n, b mod n), and takes the grants from the bottom-right n x n
// quadrant. For the priority patterns the two arbiters produce (one whole
// priority column and one whole priority row for the wave front arbiter, one
// wrapped diagonal for the wrapped wave front arbiter) every cell's result
// depends only on cells at most n-1 steps up and n-1 steps left of it before
// a priority override cuts the chain, so the quadrant computes exactly what
// the wrapped array settles to. The cost is four times the cells; the logic
// depth is unchanged. This unrolling is a choice of this implementation, not
// part of the published arrays.
//
// Interface: req/grant/xp/yp are packed [row][col]; opb[j] blocks column j.
// Timing: purely combinational. Each row and each column of the priority
// inputs must carry at least one 1 (see above); otherwise no grant is given.
module arb_cell_array #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0][N-1:0] req,
  input  logic [N-1:0]        opb,
  input  logic [N-1:0][N-1:0] xp,
  input  logic [N-1:0][N-1:0] yp,
  output logic [N-1:0][N-1:0] grant
);

  localparam int unsigned M = 2 * N;

  // x[a][b] is XI of grid cell (a,b); x[a][M] is XO of the row's last cell.
  logic [M-1:0][M:0]   x;
  logic [M:0][M-1:0]   y;
  logic [M-1:0][M-1:0] g;

  for (genvar a = 0; a < M; a++) begin : g_row
    assign x[a][0] = 1'b0;
    for (genvar b = 0; b < M; b++) begin : g_col
      if (a == 0) begin : g_top
        assign y[0][b] = 1'b0;
      end
      arb_cell u_cell (
        .r  (req[a % N][b % N]),
        .opb(opb[b % N]),
        .xi (x[a][b]),
        .yi (y[a][b]),
        .xp (xp[a % N][b % N]),
        .yp (yp[a % N][b % N]),
        .xo (x[a][b+1]),
        .yo (y[a+1][b]),
        .g  (g[a][b])
      );
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_out_row
    for (genvar j = 0; j < N; j++) begin : g_out_col
      assign grant[i][j] = g[N+i][N+j];
    end
  end

endmodule
