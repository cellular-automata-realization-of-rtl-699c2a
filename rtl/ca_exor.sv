// ca_exor: CA exclusive-OR, a single cell with two open doors.
//
// Cell e has its West door open toward cell x and a second door, Y_DOOR
// (East by default), open toward cell y; all other doors are closed. Under
// the S1 rule it fires when exactly one of the two is active:
// e(t+1) = x(t) ^ y(t). x_i and y_i are the activations of the two
// neighbour cells; e_o is registered, one generation of latency.
// The default (x West, e, y East in a row) is the documented EXOR cell. The
// Y_DOOR parameter is this design's, so the same structure also serves where
// the second operand arrives from another side, as in the cellular Toffoli
// gate (North).
module ca_exor
  import ca_pkg::*;
#(
  parameter door_e Y_DOOR = DOOR_E
) (
  input  logic clk,
  input  logic rst_n,
  input  logic x_i,  // activation of the West neighbour
  input  logic y_i,  // activation of the neighbour behind Y_DOOR
  output logic e_o
);
  doors_t doors, nbr;

  always_comb begin
    doors = D_W;
    doors[Y_DOOR] = 1'b1;
    nbr = '0;
    nbr[DOOR_W] = x_i;
    nbr[Y_DOOR] = y_i;
  end

  ca_cell u_e (
    .clk, .rst_n, .step_i(1'b1), .load_i(1'b0), .load_act_i(1'b0),
    .doors_i(doors), .nbr_i(nbr), .act_o(e_o)
  );

  initial begin : check_params
    if (Y_DOOR == DOOR_W) $error("ca_exor: Y_DOOR must differ from the West door");
  end
endmodule
