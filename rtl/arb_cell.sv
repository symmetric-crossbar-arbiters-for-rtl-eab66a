// arb_cell -- one arbitration cell of a symmetric crossbar arbiter.
//
// Each crosspoint (i,j) of the crossbar has one cell. The cell grants its
// request when the request is valid, its output port is not blocked, no cell
// earlier in its column has granted (YI) and no cell earlier in its row has
// granted (XI). The priority inputs XP and YP mark the cell as the start of
// the arbitration wave in its row and column; they override XI and YI, which
// is what lets the row and column chains be closed into rings. Logic
// equations (as published):
//   G  = (R & ~OPB) & (YI | YP) & (XI | XP)
//   YO = (YI | YP) & ~G
//   XO = (XI | XP) & ~G
// XI/XO run west to east along a row, YI/YO north to south along a column.
//
// The equations and signal names follow the published cell. Making opb
// active high (1 = blocked) is this implementation's choice.
//
// Interface: all single bits; opb is 1 when the cell's output port (its
// column) is blocked. Timing: purely combinational, no clock.
module arb_cell (
  input  logic r,    // request for this crosspoint
  input  logic opb,  // output port blocked (1 = blocked)
  input  logic xi,   // no grant to the west in this row
  input  logic yi,   // no grant to the north in this column
  input  logic xp,   // top priority in the row direction
  input  logic yp,   // top priority in the column direction
  output logic xo,   // no grant up to and including this cell, row
  output logic yo,   // no grant up to and including this cell, column
  output logic g     // grant
);

  logic x_free, y_free;

  always_comb begin
    x_free = xi | xp;
    y_free = yi | yp;
    g      = r & ~opb & y_free & x_free;
    yo     = y_free & ~g;
    xo     = x_free & ~g;
  end

endmodule
