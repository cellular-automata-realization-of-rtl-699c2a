// ca_toffoli_tile: cellular Toffoli gate laid out as a lattice tile.
//
// The tile has the same input and output placement as the Boolean Davio tile
// (West and North in, East and South out):
//   left_up_i  -> control z, leaves East as right_up_o
//   top_i      -> control y, leaves East as right_lo_o
//   left_lo_i  -> target x,  leaves South as bottom_o = x ^ y z
// and every one of the three wires takes exactly TILE_LATENCY generations
// (18 in the documented tile), so tiles can be abutted with no further
// timing care. Each input is the activation of the outside cell next to the
// tile's input cell; each output is the activation of the tile's own edge
// cell. Internally the cellular Toffoli gate (7 generations) is followed on
// each wire by a channel of TILE_LATENCY - 7 cells; the document's own tile
// folds the same delay into its three-layer layout, which is not reproduced
// cell for cell here. Pipelined: one operand set per generation.
module ca_toffoli_tile
  import ca_pkg::*;
#(
  parameter int unsigned TILE_LATENCY = 18
) (
  input  logic clk,
  input  logic rst_n,
  input  logic top_i,
  input  logic left_up_i,
  input  logic left_lo_i,
  output logic right_up_o,
  output logic right_lo_o,
  output logic bottom_o
);
  localparam int unsigned PAD = TILE_LATENCY - TOFFOLI_LATENCY;

  logic tx, ty, tz;

  ca_toffoli u_gate (
    .clk, .rst_n,
    .x_i(left_lo_i), .y_i(top_i), .z_i(left_up_i),
    .x_o(tx), .y_o(ty), .z_o(tz)
  );

  ca_channel #(.LEN(PAD)) u_pad_x (.clk, .rst_n, .in_i(tx), .out_o(bottom_o));
  ca_channel #(.LEN(PAD)) u_pad_y (.clk, .rst_n, .in_i(ty), .out_o(right_lo_o));
  ca_channel #(.LEN(PAD)) u_pad_z (.clk, .rst_n, .in_i(tz), .out_o(right_up_o));

  initial begin : check_params
    if (TILE_LATENCY < TOFFOLI_LATENCY)
      $error("ca_toffoli_tile: TILE_LATENCY must be at least %0d", TOFFOLI_LATENCY);
  end
endmodule
