// ca_davio_lattice: the reversible Davio lattice running on the automaton.
//
// ROWS x COLS cellular Toffoli tiles (ca_toffoli_tile) wired by abutment
// exactly as the Boolean lattice (davio_lattice): the East upper output of a
// tile feeds the West upper input of the next tile in the row (the row
// variable), the East lower output feeds its West lower input, and the South
// output feeds the North input of the tile below.
//
// In the automaton a 1 is a pulse and a 0 is the absence of one, so every
// operand of a tile must arrive in the same generation. Tile (r,c) works on
// operands that entered the lattice TILE_LATENCY * (r + c) generations
// earlier, so the inputs of row r (its variable and its West constant) pass
// through a channel of TILE_LATENCY * r cells, and the constant of column c
// through one of TILE_LATENCY * c cells. All inputs are therefore presented
// in the same generation t, and
//   f_o(t + LATENCY) = F(var, constants),  LATENCY = TILE_LATENCY * (ROWS + COLS - 1),
// 90 generations at the default 3 x 3, 18. The garbage outputs leave earlier,
// each as soon as its wire reaches the lattice edge: bottom_o[c] after
// TILE_LATENCY * (ROWS + c), right_up_o[r] and right_lo_o[r] after
// TILE_LATENCY * (r + COLS) generations. A new input set may be presented
// every generation. The delay channels are this design's choice; the
// documented layout brings the variables to their rows through its own
// routing.
module ca_davio_lattice
  import ca_pkg::*;
#(
  parameter int unsigned ROWS         = 3,
  parameter int unsigned COLS         = 3,
  parameter int unsigned TILE_LATENCY = 18
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [ROWS-1:0] var_i,        // pulses of the row variables (row 0 on top)
  input  logic [ROWS-1:0] left_const_i, // pulses of the West constants
  input  logic [COLS-1:0] top_const_i,  // pulses of the North constants
  output logic            f_o,          // F, LATENCY generations later
  output logic [COLS-1:0] bottom_o,     // South outputs of the bottom row ([COLS-1] is f_o)
  output logic [ROWS-1:0] right_up_o,   // East upper outputs of the right column
  output logic [ROWS-1:0] right_lo_o    // East lower outputs of the right column
);
  logic [COLS-1:0] vert [ROWS+1];
  logic [COLS:0]   hup  [ROWS];
  logic [COLS:0]   hlo  [ROWS];

  for (genvar c = 0; c < COLS; c++) begin : g_top
    ca_channel #(.LEN(TILE_LATENCY * c)) u_dly (
      .clk, .rst_n, .in_i(top_const_i[c]), .out_o(vert[0][c]));
  end

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    ca_channel #(.LEN(TILE_LATENCY * r)) u_dly_var (
      .clk, .rst_n, .in_i(var_i[r]), .out_o(hup[r][0]));
    ca_channel #(.LEN(TILE_LATENCY * r)) u_dly_const (
      .clk, .rst_n, .in_i(left_const_i[r]), .out_o(hlo[r][0]));
    for (genvar c = 0; c < COLS; c++) begin : g_col
      ca_toffoli_tile #(.TILE_LATENCY(TILE_LATENCY)) u_tile (
        .clk, .rst_n,
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
