// wfa_arbiter -- wave front symmetric crossbar arbiter.
//
// Resolves n^2 crosspoint requests of an n x n crossbar so that each row
// (input buffer) and each column (output port) gets at most one grant, and
// the grants form a maximal set: no requested, unblocked crosspoint is left
// whose row and column are both free. One cell has the top priority; the
// arbitration wave starts there and sweeps diagonally through the wrapped
// array (cell (i,j) at wrapped distance (a,b) from the top cell settles after
// a+b+1 cell delays, 2n-1 in all).
//
// The top cell is the crossing of the priority column, held in the
// horizontal (XP) token ring, and the priority row, held in the vertical (YP)
// ring. Every cell of the priority column gets XP = 1 and every cell of the
// priority row gets YP = 1. The XP ring advances every clock cycle and the YP
// ring advances once per lap of the XP ring, when the XP token leaves the
// last column, so every crosspoint is top cell once in n^2 cycles. Both rings
// reset to column 0 / row 0.
//
// With HOLD_PRIORITY = 1 the starvation guard is enabled: the XP ring (and so
// the YP ring) does not advance in a cycle in which the top cell is requested
// but not granted, i.e. its output port is blocked. The top cell then keeps
// the priority until it has sent one packet. HOLD_PRIORITY = 0 is the plain
// rotating arbiter.
//
// The cell array, the two rings, their stepping rule and the guard follow
// the published arbiter. The token direction (column j to j+1, row i to
// i+1), reset to cell (0,0) and the use of static flip-flops for the rings
// are this implementation's choices, as is the loop-free array (see
// arb_cell_array).
//
// Interface: req/grant are packed [row][col]; opb[j] = 1 blocks output j.
// top_col/top_row show the ring contents (one-hot). Timing: grant is a
// combinational function of req, opb and the ring state in the same cycle;
// the rings step on the rising edge of clk; rst_n is asynchronous, active low.
module wfa_arbiter #(
  parameter int unsigned N             = 4,
  parameter bit          HOLD_PRIORITY = 1'b0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N-1:0][N-1:0] req,
  input  logic [N-1:0]        opb,
  output logic [N-1:0][N-1:0] grant,
  output logic [N-1:0]        top_col,
  output logic [N-1:0]        top_row
);

  logic [N-1:0][N-1:0] xp, yp;
  logic                top_req, top_gnt, x_advance, x_wrap;

  always_comb begin
    top_req = 1'b0;
    top_gnt = 1'b0;
    for (int i = 0; i < N; i++) begin
      for (int j = 0; j < N; j++) begin
        xp[i][j] = top_col[j];
        yp[i][j] = top_row[i];
        top_req |= top_row[i] & top_col[j] & req[i][j];
        top_gnt |= top_row[i] & top_col[j] & grant[i][j];
      end
    end
    x_advance = !(HOLD_PRIORITY && top_req && !top_gnt);
  end

  token_ring #(.N(N)) u_xp_ring (
    .clk, .rst_n, .advance(x_advance), .tok(top_col), .wrap(x_wrap)
  );

  token_ring #(.N(N)) u_yp_ring (
    .clk, .rst_n, .advance(x_wrap), .tok(top_row), .wrap()
  );

  arb_cell_array #(.N(N)) u_array (
    .req, .opb, .xp, .yp, .grant
  );

endmodule
