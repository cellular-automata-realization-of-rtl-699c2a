// davio_tile: a Toffoli gate with its wires placed so that tiles abut.
//
// Inputs enter on the west and north edges, outputs leave on the east and
// south edges:
//   left_up_i  -> first control, leaves straight east as right_up_o
//   top_i      -> second control, turns and leaves east as right_lo_o
//   left_lo_i  -> target, turns and leaves south as bottom_o
// so bottom_o = left_lo_i ^ (left_up_i & top_i). In a lattice, right_lo_o of
// one tile feeds left_lo_i of its east neighbour, and bottom_o feeds top_i of
// the tile below. Combinational. The edge placement follows the documented
// tile drawing; right_up_o and right_lo_o are plain wires by definition.
module davio_tile (
  input  logic top_i,
  input  logic left_up_i,
  input  logic left_lo_i,
  output logic right_up_o,
  output logic right_lo_o,
  output logic bottom_o
);
  toffoli_gate u_gate (
    .x_i(left_lo_i), .y_i(left_up_i), .z_i(top_i),
    .x_o(bottom_o),  .y_o(right_up_o), .z_o(right_lo_o)
  );
endmodule
