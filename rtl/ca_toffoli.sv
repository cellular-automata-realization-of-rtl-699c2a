// ca_toffoli: Toffoli gate realised in two layers of S1 cells.
//
// x_o(t+7) = x_i(t) ^ (y_i(t) & z_i(t)), y_o(t+7) = y_i(t), z_o(t+7) = z_i(t).
// x_i, y_i and z_i are the activations of the three input cells just West of
// the structure; the outputs are the activations of its three East cells.
// Every wire takes exactly TOFFOLI_LATENCY = 7 generations (ca_pkg), and since no cell looks
// back upstream, a new operand triple may enter every generation.
//
// Cell map (row 0 at North, column 0 holds the outside input cells):
//
//  upper layer                      lower layer
//  r0:  z    .    .    zo          z0   z3   z4   z5
//  r1:  .    Eeckhaut gate         z1   z2   y2   y3
//  r2:  y    .    a1   yo          .    y0   y1   y4
//  r3:  .    .    a2   .           x1   x2   .    .
//  r4:  x    xu   xr   xo          x0   x3   .    .
//
// The Eeckhaut gate sits in the upper layer between rows 0 and 2 (mirrored
// top to bottom: the y row has two cells, the z row three) and fires on
// y & z three generations after its inputs. The product runs South through
// a1 and a2 into xr, which opens its West and North doors and so forms the
// EXOR with the delayed x. The copies of z (from the z input cell), of y (from
// the second y cell) and x itself take detours through the lower layer (doors
// U/L) so that they cross the product path and arrive in step:
//   z: z0 U, z1 N, z2 W, z3 S, z4 W, z5 W, then zo L
//   y: y0 U, y1 W, y2 S, y3 W, y4 N, then yo L
//   x: x0 U, x1 S, x2 W, x3 N, then xu L, xr W+N, xo W
// The upper layer follows the documented two-layer gate. The lower-layer
// detours are completed here so that all three wires take the same time;
// their exact cells may differ from the original layout.
module ca_toffoli
  import ca_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic x_i,  // target
  input  logic y_i,  // control
  input  logic z_i,  // control
  output logic x_o,  // x ^ y z
  output logic y_o,
  output logic z_o
);
  logic e, y_1;
  logic a1, a2, xu, xr;
  logic z0, z1, z2, z3, z4, z5;
  logic y0, y1, y2, y3, y4;
  logic x0, x1, x2, x3;

  // Mirrored Eeckhaut gate: its two-cell row carries y, its three-cell row z.
  ca_eeckhaut u_and (.clk, .rst_n, .x_i(y_i), .y_i(z_i), .e_o(e), .x1_o(y_1), .y1_o());

`define CA_CELL(NAME, DOORS, NBR, ACT) \
  ca_cell NAME (.clk, .rst_n, .step_i(1'b1), .load_i(1'b0), .load_act_i(1'b0), \
                .doors_i(DOORS), .nbr_i(NBR), .act_o(ACT));

  //        instance   doors        neighbours  (w, e, n, s, u, l)        activation
  // upper layer: product path and outputs
  `CA_CELL(u_a1, D_N,        nbrs(1'b0, 1'b0, e,    1'b0, 1'b0, 1'b0), a1)
  `CA_CELL(u_a2, D_N,        nbrs(1'b0, 1'b0, a1,   1'b0, 1'b0, 1'b0), a2)
  `CA_CELL(u_xu, D_L,        nbrs(1'b0, 1'b0, 1'b0, 1'b0, 1'b0, x3),   xu)
  `CA_CELL(u_xo, D_W,        nbrs(xr,   1'b0, 1'b0, 1'b0, 1'b0, 1'b0), x_o)
  `CA_CELL(u_yo, D_L,        nbrs(1'b0, 1'b0, 1'b0, 1'b0, 1'b0, y4),   y_o)
  `CA_CELL(u_zo, D_L,        nbrs(1'b0, 1'b0, 1'b0, 1'b0, 1'b0, z5),   z_o)
  // lower layer: z detour
  `CA_CELL(l_z0, D_U,        nbrs(1'b0, 1'b0, 1'b0, 1'b0, z_i,  1'b0), z0)
  `CA_CELL(l_z1, D_N,        nbrs(1'b0, 1'b0, z0,   1'b0, 1'b0, 1'b0), z1)
  `CA_CELL(l_z2, D_W,        nbrs(z1,   1'b0, 1'b0, 1'b0, 1'b0, 1'b0), z2)
  `CA_CELL(l_z3, D_S,        nbrs(1'b0, 1'b0, 1'b0, z2,   1'b0, 1'b0), z3)
  `CA_CELL(l_z4, D_W,        nbrs(z3,   1'b0, 1'b0, 1'b0, 1'b0, 1'b0), z4)
  `CA_CELL(l_z5, D_W,        nbrs(z4,   1'b0, 1'b0, 1'b0, 1'b0, 1'b0), z5)
  // lower layer: y detour
  `CA_CELL(l_y0, D_U,        nbrs(1'b0, 1'b0, 1'b0, 1'b0, y_1,  1'b0), y0)
  `CA_CELL(l_y1, D_W,        nbrs(y0,   1'b0, 1'b0, 1'b0, 1'b0, 1'b0), y1)
  `CA_CELL(l_y2, D_S,        nbrs(1'b0, 1'b0, 1'b0, y1,   1'b0, 1'b0), y2)
  `CA_CELL(l_y3, D_W,        nbrs(y2,   1'b0, 1'b0, 1'b0, 1'b0, 1'b0), y3)
  `CA_CELL(l_y4, D_N,        nbrs(1'b0, 1'b0, y3,   1'b0, 1'b0, 1'b0), y4)
  // lower layer: x detour
  `CA_CELL(l_x0, D_U,        nbrs(1'b0, 1'b0, 1'b0, 1'b0, x_i,  1'b0), x0)
  `CA_CELL(l_x1, D_S,        nbrs(1'b0, 1'b0, 1'b0, x0,   1'b0, 1'b0), x1)
  `CA_CELL(l_x2, D_W,        nbrs(x1,   1'b0, 1'b0, 1'b0, 1'b0, 1'b0), x2)
  `CA_CELL(l_x3, D_N,        nbrs(1'b0, 1'b0, x2,   1'b0, 1'b0, 1'b0), x3)

`undef CA_CELL

  // xr: EXOR of the delayed x (West) and the product (North)
  ca_exor #(.Y_DOOR(DOOR_N)) u_xr (.clk, .rst_n, .x_i(xu), .y_i(a2), .e_o(xr));
endmodule
