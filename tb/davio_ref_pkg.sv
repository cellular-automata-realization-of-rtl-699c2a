// davio_ref_pkg: reference model of the Davio lattice for the testbenches.
//
// Evaluates a lattice of up to 8 x 8 Toffoli tiles cell by cell with plain
// integer arithmetic: each tile maps (north t, west-upper u, west-lower l) to
// (east-upper u, east-lower t, south l ^ (u & t)). Rows take the variables
// on the West-upper wire, the left column and the top row take constants.
package davio_ref_pkg;

  typedef struct packed {
    logic       f;
    logic [7:0] bottom;
    logic [7:0] right_up;
    logic [7:0] right_lo;
  } lat_out_t;

  function automatic lat_out_t davio_ref(int rows, int cols, logic [7:0] vars,
                                         logic [7:0] left_c, logic [7:0] top_c);
    int north [8];
    int up, lo, nxt;
    lat_out_t o;
    o = '0;
    for (int c = 0; c < cols; c++) north[c] = int'(top_c[c]);
    for (int r = 0; r < rows; r++) begin
      up = int'(vars[r]);
      lo = int'(left_c[r]);
      for (int c = 0; c < cols; c++) begin
        nxt      = (lo + up * north[c]) % 2;  // target ^ (control & control)
        lo       = north[c];                  // second control leaves East
        north[c] = nxt;                       // target leaves South
      end
      o.right_up[r] = up[0];
      o.right_lo[r] = lo[0];
    end
    for (int c = 0; c < cols; c++) o.bottom[c] = north[c][0];
    o.f = north[cols-1][0];
    return o;
  endfunction

endpackage
