// ca_eeckhaut: Eeckhaut gate, a delayed AND made of six S1 cells.
//
// Layout (one layer, North up, x and y are outside cells at column 0):
//   row 0:  x     x1
//   row 1:  p     q     e
//   row 2:  y     y1    y2
// Doors: x1 W; p N; q N,W,S; e W,S; y1 W; y2 W.
// With only x: x1 and p fire, q sees two and stays off, so e never fires.
// With only y: q and y2 fire together, e sees two and stays off.
// With both: q sees three and stays off, so e sees only y2 and fires.
// Hence e(t+3) = x(t) & y(t). The structure is feed-forward, so a new
// operand pair can enter every generation. x1_o (the cell after x) and
// y1_o (the cell after y) are exposed so an enclosing design can take a copy
// of an operand on to another path, as the cellular Toffoli gate does.
// The six cells and their doors follow the documented gate (its layout and
// its three operand timelines); the two tap outputs are this design's.
module ca_eeckhaut
  import ca_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic x_i,
  input  logic y_i,
  output logic e_o,
  output logic x1_o,
  output logic y1_o
);
  logic p, q, y2;

  // nbr_i bit order {L, U, S, N, E, W}
  ca_cell u_x1 (.clk, .rst_n, .step_i(1'b1), .load_i(1'b0), .load_act_i(1'b0),
                .doors_i(D_W),               .nbr_i({5'b0, x_i}),             .act_o(x1_o));
  ca_cell u_p  (.clk, .rst_n, .step_i(1'b1), .load_i(1'b0), .load_act_i(1'b0),
                .doors_i(D_N),               .nbr_i({3'b0, x_i, 2'b0}),       .act_o(p));
  ca_cell u_q  (.clk, .rst_n, .step_i(1'b1), .load_i(1'b0), .load_act_i(1'b0),
                .doors_i(D_N | D_W | D_S),   .nbr_i({2'b0, y1_o, x1_o, 1'b0, p}), .act_o(q));
  ca_cell u_e  (.clk, .rst_n, .step_i(1'b1), .load_i(1'b0), .load_act_i(1'b0),
                .doors_i(D_W | D_S),         .nbr_i({2'b0, y2, 2'b0, q}),     .act_o(e_o));
  ca_cell u_y1 (.clk, .rst_n, .step_i(1'b1), .load_i(1'b0), .load_act_i(1'b0),
                .doors_i(D_W),               .nbr_i({5'b0, y_i}),             .act_o(y1_o));
  ca_cell u_y2 (.clk, .rst_n, .step_i(1'b1), .load_i(1'b0), .load_act_i(1'b0),
                .doors_i(D_W),               .nbr_i({5'b0, y1_o}),            .act_o(y2));
endmodule
