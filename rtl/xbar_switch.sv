// xbar_switch -- crossbar of a communication switch with its symmetric
// crossbar arbiter.
//
// Each of the n input buffers is a multi-queue buffer with one queue per
// output port, so input i raises req[i][j] whenever its queue for output j
// holds a packet, and may raise several at once. The arbiter picks at most
// one crosspoint per row and per column; its grant lines go back to the
// buffers and the same lines drive the crossbar control lines, so in the
// cycle a crosspoint is granted the crossbar joins in_data[i] to
// out_data[j]. opb[j] (output port blocked) keeps output j out of the
// arbitration, for flow control towards a full buffer downstream.
//
// SCHEME picks the wave front arbiter (default, the 4 x 4 / 8-bit switch the
// design was laid out as) or the faster wrapped wave front arbiter;
// HOLD_PRIORITY enables the starvation guard of either.
//
// The arrangement (arbiter with n^2 request, n^2 grant and n OPB lines
// beside a crossbar driven by n^2 control lines) follows the published
// switch. Using the grant lines themselves, in the same cycle, as the
// control lines is this implementation's choice.
//
// Interface: req/grant packed [input][output]; in_data[i] from input buffer
// i; out_data[j] to output port j. Timing: grant and out_data are
// combinational in the cycle of the request (one arbitration per clock
// cycle); priority state steps on the rising clock edge; rst_n asynchronous,
// active low.
module xbar_switch
  import xbar_pkg::*;
#(
  parameter int unsigned N             = 4,
  parameter int unsigned D             = 8,
  parameter arb_scheme_t SCHEME        = ARB_WFA,
  parameter bit          HOLD_PRIORITY = 1'b0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N-1:0][N-1:0] req,
  input  logic [N-1:0]        opb,
  output logic [N-1:0][N-1:0] grant,
  input  logic [N-1:0][D-1:0] in_data,
  output logic [N-1:0][D-1:0] out_data
);

  if (SCHEME == ARB_WFA) begin : g_wfa
    logic [N-1:0] top_col, top_row;
    wfa_arbiter #(.N(N), .HOLD_PRIORITY(HOLD_PRIORITY)) u_arb (
      .clk, .rst_n, .req, .opb, .grant, .top_col, .top_row
    );
  end else begin : g_wwfa
    logic [N-1:0] top_diag;
    wwfa_arbiter #(.N(N), .HOLD_PRIORITY(HOLD_PRIORITY)) u_arb (
      .clk, .rst_n, .req, .opb, .grant, .top_diag
    );
  end

  crossbar #(.N(N), .D(D)) u_xbar (
    .in_data, .ctrl(grant), .out_data
  );

  // Rules of a legal crossbar configuration.
  function automatic bit legal(logic [N-1:0][N-1:0] gnt);
    for (int k = 0; k < N; k++) begin
      logic [N-1:0] col;
      for (int i = 0; i < N; i++) col[i] = gnt[i][k];
      if (!$onehot0(gnt[k]) || !$onehot0(col)) return 1'b0;
    end
    return 1'b1;
  endfunction

  a_legal: assert property (@(posedge clk) disable iff (!rst_n) legal(grant))
    else $error("xbar_switch: two grants in one row or column");
  a_granted_requested: assert property (@(posedge clk) disable iff (!rst_n)
    (grant & ~req) == '0)
    else $error("xbar_switch: grant without request");

endmodule
