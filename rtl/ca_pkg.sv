// ca_pkg: shared definitions for the door-gated cellular automaton.
//
// A cell holds one pulsing state bit (its activation) and six frozen door
// bits, one per face of the cube. A door that is open lets the cell see the
// activation of the neighbour on that side. The next activation is the
// elementary symmetric function S1 of the door-masked neighbour activations:
// 1 when exactly one of them is 1. The door order below (West, East, North,
// South, Upper, Lower) follows the order in which the notation lists them;
// the bit numbering itself is this design's choice.
package ca_pkg;

  typedef enum logic [2:0] {
    DOOR_W = 3'd0,  // neighbour at x-1
    DOOR_E = 3'd1,  // neighbour at x+1
    DOOR_N = 3'd2,  // neighbour at y-1
    DOOR_S = 3'd3,  // neighbour at y+1
    DOOR_U = 3'd4,  // neighbour at z+1 (upper layer)
    DOOR_L = 3'd5   // neighbour at z-1 (lower layer)
  } door_e;

  localparam int unsigned NDOORS = 6;
  typedef logic [NDOORS-1:0] doors_t;

  // One-hot door masks, used to write frozen door sets as constants.
  localparam doors_t D_W = 6'b000001;
  localparam doors_t D_E = 6'b000010;
  localparam doors_t D_N = 6'b000100;
  localparam doors_t D_S = 6'b001000;
  localparam doors_t D_U = 6'b010000;
  localparam doors_t D_L = 6'b100000;

  // Generations from input cells to output cells of the cellular Toffoli
  // gate (ca_toffoli); fixed by its layout.
  localparam int unsigned TOFFOLI_LATENCY = 7;

  // S1: exactly one bit of v is set.
  function automatic logic s1(input doors_t v);
    return (v != '0) && ((v & (v - doors_t'(1))) == '0);
  endfunction

  // Pack the six neighbour activations into door order.
  function automatic doors_t nbrs(input logic w, input logic e, input logic n,
                                  input logic s, input logic u, input logic l);
    return {l, u, s, n, e, w};
  endfunction

endpackage
