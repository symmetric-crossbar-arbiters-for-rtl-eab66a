// xbar_pkg -- types and helpers shared by the symmetric crossbar arbiter and
// the switch around it.
//
// arb_scheme_t selects which of the two proposed arbiters a switch uses:
//   ARB_WFA  : wave front arbiter, one top-priority cell chosen by a
//              horizontal and a vertical token ring.
//   ARB_WWFA : wrapped wave front arbiter, one top-priority wrapped diagonal
//              chosen by a single token ring.
// The crossbar request, grant and control matrices are packed as
// [row][column] = [input buffer][output port] throughout.
package xbar_pkg;

  typedef enum logic [0:0] {
    ARB_WFA  = 1'b0,
    ARB_WWFA = 1'b1
  } arb_scheme_t;

  // Wrapped-diagonal index of crosspoint (row, col) in an n x n array:
  // diagonal k holds every cell with (row + col) mod n == k, so diagonal 0
  // is (0,0), (1,n-1), (2,n-2), ... as in the 4x4 example (1,1),(2,4),(3,3),(4,2)
  // in 1-based numbering.
  function automatic int unsigned diag_of(int unsigned row, int unsigned col,
                                          int unsigned n);
    return (row + col) % n;
  endfunction

endpackage
