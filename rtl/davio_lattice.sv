// davio_lattice: reversible Davio lattice built only of Toffoli tiles.
//
// ROWS x COLS tiles. Row r receives input variable var_i[r] on the upper
// left wire and passes it across the whole row. The left column receives
// constant left_const_i[r] on the lower left wire of row r; the top row
// receives constant top_const_i[c] on the top wire of column c. Each tile
// applies one positive-Davio step (out = in ^ var & other), so the south
// output of the bottom-right tile, f_o, is an EXOR polynomial of the
// variables whose terms the constants select. With the default 3 x 3 size
// and variables C, B, A from top to bottom, the 64 constant settings give
// the 16 symmetric functions of three variables; top_const_i[1] = 1 with all
// other constants 0 gives the majority function AB ^ BC ^ CA.
// All other outputs are garbage of the reversible network and are brought
// out so nothing is left unconnected. Combinational. The array, the
// constant placement and the majority example follow the documented
// lattice; the ROWS/COLS generalisation is this design's.
module davio_lattice #(
  parameter int unsigned ROWS = 3,
  parameter int unsigned COLS = 3
) (
  input  logic [ROWS-1:0] var_i,        // [r]: variable of row r (row 0 on top)
  input  logic [ROWS-1:0] left_const_i, // [r]: constant on the lower west wire of row r
  input  logic [COLS-1:0] top_const_i,  // [c]: constant on the north wire of column c
  output logic            f_o,          // function output, south of tile (ROWS-1, COLS-1)
  output logic [COLS-1:0] bottom_o,     // south outputs of the bottom row ([COLS-1] is f_o)
  output logic [ROWS-1:0] right_up_o,   // east upper outputs of the right column
  output logic [ROWS-1:0] right_lo_o    // east lower outputs of the right column
);
  // vert[r][c]: north input of tile (r,c); vert[ROWS] holds the bottom outputs.
  logic [COLS-1:0] vert [ROWS+1];
  // hup/hlo[r][c]: west upper/lower input of tile (r,c); index COLS is the east edge.
  logic [COLS:0]   hup  [ROWS];
  logic [COLS:0]   hlo  [ROWS];

  assign vert[0] = top_const_i;

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    assign hup[r][0] = var_i[r];
    assign hlo[r][0] = left_const_i[r];
    for (genvar c = 0; c < COLS; c++) begin : g_col
      davio_tile u_tile (
        .top_i     (vert[r][c]),
        .left_up_i (hup[r][c]),
        .left_lo_i (hlo[r][c]),
        .right_up_o(hup[r][c+1]),
        .right_lo_o(hlo[r][c+1]),
        .bottom_o  (vert[r+1][c])
      );
    end
    assign right_up_o[r] = hup[r][COLS];
    assign right_lo_o[r] = hlo[r][COLS];
  end

  assign bottom_o = vert[ROWS];
  assign f_o      = vert[ROWS][COLS-1];
endmodule
