// davio_ca_top: three-variable reversible Davio lattice, as Boolean logic and
// as a structure in a door-gated cellular automaton, plus a programmable
// automaton space.
//
// Parts, side by side:
//   u_logic  davio_lattice: the 3 x 3 Toffoli lattice as combinational logic.
//            f_logic_o = F(A, B, C) for the constants C1..C6 on const_i.
//   u_ca     ca_davio_lattice: the same lattice built of S1 cells. A 1 is a
//            pulse, so on a clock with launch_i = 1 the top injects one pulse
//            for every input and constant that is 1; f_o carries the pulse of
//            F exactly 18 * 5 = 90 clocks later (18 per tile, 5 tiles on the
//            longest path). A new launch may follow on every clock.
//   u_space  ca_space: a 24 x 24 x 24 automaton whose doors and activations
//            are written through the space_* ports; it can hold and run any
//            door pattern, including the cells of u_ca.
// Lattice wiring: rows from top to bottom take C, B, A on their upper West
// wire; the West constants are C3, C2, C1 and the North constants of the
// three columns C4, C5, C6; F leaves South of the bottom-right tile. With
// C5 = 1 and all other constants 0, F = AB ^ BC ^ CA. const_i[k-1] is Ck.
// The launch gating is this design's own way of presenting inputs.
module davio_ca_top
  import ca_pkg::*;
#(
  parameter int unsigned TILE_LATENCY = 18,
  parameter int unsigned SPACE_N      = 24,
  localparam int unsigned ROWS = 3,
  localparam int unsigned COLS = 3,
  localparam int unsigned SW = (SPACE_N > 1) ? $clog2(SPACE_N) : 1
) (
  input  logic clk,
  input  logic rst_n,
  // lattice inputs
  input  logic       launch_i,   // inject one input set into the CA lattice
  input  logic       a_i,
  input  logic       b_i,
  input  logic       c_i,
  input  logic [5:0] const_i,    // [k-1] = constant Ck
  // Boolean lattice
  output logic       f_logic_o,
  // CA lattice: F and the garbage outputs, LATENCY clocks after launch
  output logic       f_o,
  output logic [COLS-1:0] ca_bottom_o,
  output logic [ROWS-1:0] ca_right_up_o,
  output logic [ROWS-1:0] ca_right_lo_o,
  // programmable automaton space
  input  logic          space_run_i,
  input  logic          space_cfg_we_i,
  input  logic [SW-1:0] space_cfg_x_i,
  input  logic [SW-1:0] space_cfg_y_i,
  input  logic [SW-1:0] space_cfg_z_i,
  input  doors_t        space_cfg_doors_i,
  input  logic          space_cfg_act_i,
  output logic [SPACE_N*SPACE_N*SPACE_N-1:0] space_act_o
);
  logic [ROWS-1:0] vars, left_c;
  logic [COLS-1:0] top_c;

  assign vars   = {a_i, b_i, c_i};                      // row 0 = C, row 2 = A
  assign left_c = {const_i[0], const_i[1], const_i[2]}; // row 0 = C3, row 2 = C1
  assign top_c  = {const_i[5], const_i[4], const_i[3]}; // col 0 = C4, col 2 = C6

  davio_lattice #(.ROWS(ROWS), .COLS(COLS)) u_logic (
    .var_i(vars), .left_const_i(left_c), .top_const_i(top_c),
    .f_o(f_logic_o), .bottom_o(), .right_up_o(), .right_lo_o()
  );

  ca_davio_lattice #(.ROWS(ROWS), .COLS(COLS), .TILE_LATENCY(TILE_LATENCY)) u_ca (
    .clk, .rst_n,
    .var_i       (vars   & {ROWS{launch_i}}),
    .left_const_i(left_c & {ROWS{launch_i}}),
    .top_const_i (top_c  & {COLS{launch_i}}),
    .f_o, .bottom_o(ca_bottom_o), .right_up_o(ca_right_up_o), .right_lo_o(ca_right_lo_o)
  );

  ca_space #(.NX(SPACE_N), .NY(SPACE_N), .NZ(SPACE_N)) u_space (
    .clk, .rst_n,
    .run_i(space_run_i), .cfg_we_i(space_cfg_we_i),
    .cfg_x_i(space_cfg_x_i), .cfg_y_i(space_cfg_y_i), .cfg_z_i(space_cfg_z_i),
    .cfg_doors_i(space_cfg_doors_i), .cfg_act_i(space_cfg_act_i),
    .act_o(space_act_o)
  );
endmodule
