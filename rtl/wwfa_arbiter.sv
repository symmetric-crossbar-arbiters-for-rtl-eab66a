// wwfa_arbiter -- wrapped wave front symmetric crossbar arbiter.
//
// Same job and same cell array as the wave front arbiter, but the wave
// starts from a whole wrapped diagonal of n cells instead of one cell. The n
// cells of a wrapped diagonal lie in different rows and columns, so they
// never conflict; all of them get XP = YP = 1. Diagonal k holds the cells
// with (row + col) mod n == k. Cell (i,j) settles after
// ((i + j - k) mod n) + 1 cell delays, n in all, so this arbiter is about
// twice as fast as the wave front arbiter for the same n.
//
// A single n-stage token ring names the priority diagonal. It resets to
// diagonal 0 and advances every clock cycle, so each crosspoint is on the
// priority diagonal once every n cycles.
//
// With HOLD_PRIORITY = 1 the starvation guard is enabled. In the first
// cycle a diagonal has the priority, the requests on it are latched. The
// ring then holds as long as a latched request has been neither granted nor
// withdrawn; requests that appear on the diagonal later do not extend its
// turn. HOLD_PRIORITY = 0 is the plain rotating arbiter.
//
// The single diagonal ring and the latched-request guard follow the
// published arbiter. The numbering of the diagonals, the ring direction,
// the reset to diagonal 0 and dropping a latched request whose request line
// falls are this implementation's choices.
//
// Interface: req/grant packed [row][col]; opb[j] = 1 blocks output j;
// top_diag is the ring (one-hot). Timing: grant is combinational in the same
// cycle; ring and latch step on the rising edge of clk; rst_n asynchronous,
// active low.
module wwfa_arbiter
  import xbar_pkg::*;
#(
  parameter int unsigned N             = 4,
  parameter bit          HOLD_PRIORITY = 1'b0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N-1:0][N-1:0] req,
  input  logic [N-1:0]        opb,
  output logic [N-1:0][N-1:0] grant,
  output logic [N-1:0]        top_diag
);

  logic [N-1:0][N-1:0] pri;
  logic [N-1:0]        diag_req, diag_gnt;  // per row, on the priority diagonal
  logic [N-1:0]        pend_q, latched, remaining;
  logic                fresh_q, hold, advance;

  always_comb begin
    diag_req = '0;
    diag_gnt = '0;
    for (int i = 0; i < N; i++) begin
      for (int j = 0; j < N; j++) begin
        pri[i][j] = top_diag[diag_of(i, j, N)];
        diag_req[i] |= pri[i][j] & req[i][j];
        diag_gnt[i] |= pri[i][j] & grant[i][j];
      end
    end
    latched   = fresh_q ? diag_req : pend_q;
    remaining = latched & diag_req & ~diag_gnt;
    hold      = HOLD_PRIORITY && (remaining != '0);
    advance   = !hold;
  end

  // Latched requests of the current priority diagonal still waiting.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_q  <= '0;
      fresh_q <= 1'b1;
    end else begin
      pend_q  <= remaining;
      fresh_q <= advance;
    end
  end

  token_ring #(.N(N)) u_ring (
    .clk, .rst_n, .advance, .tok(top_diag), .wrap()
  );

  arb_cell_array #(.N(N)) u_array (
    .req, .opb, .xp(pri), .yp(pri), .grant
  );

endmodule
