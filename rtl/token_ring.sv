// token_ring -- circular shift register carrying one priority token.
//
// The symmetric crossbar arbiters rotate their top priority with n-stage
// token rings: stage k holds 1 while row, column or wrapped diagonal k has
// the top priority. On reset the first stage holds the token and all others
// are 0, as in the published ring. Each clock edge with `advance` high moves
// the token one stage on (k -> k+1, last -> first); with `advance` low the
// ring holds, which the starvation-free variants need, so the ring is built
// from static flip-flops rather than the dynamic two-phase latches of the
// published layout.
//
// Interface: tok is one-hot. wrap is high in a cycle in which the token sits
// in the last stage and is about to move back to the first; the wave front
// arbiter uses it to advance its vertical ring once per horizontal lap.
// Timing: tok changes on the rising clock edge; rst_n is asynchronous and
// active low.
module token_ring #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         advance,
  output logic [N-1:0] tok,
  output logic         wrap
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       tok <= N'(1);
    else if (advance) tok <= {tok[N-2:0], tok[N-1]};
  end

  assign wrap = advance & tok[N-1];

  a_one_token: assert property (@(posedge clk) disable iff (!rst_n) $onehot(tok))
    else $error("token_ring: token lost or duplicated");

endmodule
