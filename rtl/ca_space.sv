// ca_space: a programmable three-dimensional door-gated cellular automaton.
//
// NX x NY x NZ cubic cells, each with up to six face neighbours: West/East
// along x, North/South along y, Upper/Lower along z. Faces on the boundary
// see an inactive neighbour. Each cell keeps six frozen door bits and one
// activation bit and follows the S1 rule of ca_cell, so any structure of the
// automaton (channels, EXOR cells, Eeckhaut gates, the cellular Toffoli tile
// and the lattice built of them) can be run by writing its door pattern.
//
// Interface:
//   cfg_we_i      write the cell at (cfg_x_i, cfg_y_i, cfg_z_i): its doors
//                 become cfg_doors_i and its activation cfg_act_i. One cell
//                 per clock. A write takes priority over the rule for that
//                 cell, which is also how input pulses are injected.
//   run_i         1: every other cell computes its next generation this
//                 clock; 0: all activations hold (used while loading).
//   act_o         all activations, bit ((z * NY) + y) * NX + x.
// rst_n clears every activation and closes every door.
// Timing: one generation per clock while run_i = 1.
// The 24-cell edge follows the 0..23 axes of the documented worksheet view;
// the write port, run control and boundary rule are this design's choices.
module ca_space
  import ca_pkg::*;
#(
  parameter int unsigned NX = 24,
  parameter int unsigned NY = 24,
  parameter int unsigned NZ = 24,
  localparam int unsigned XW = (NX > 1) ? $clog2(NX) : 1,
  localparam int unsigned YW = (NY > 1) ? $clog2(NY) : 1,
  localparam int unsigned ZW = (NZ > 1) ? $clog2(NZ) : 1,
  localparam int unsigned NCELLS = NX * NY * NZ
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              run_i,
  input  logic              cfg_we_i,
  input  logic [XW-1:0]     cfg_x_i,
  input  logic [YW-1:0]     cfg_y_i,
  input  logic [ZW-1:0]     cfg_z_i,
  input  doors_t            cfg_doors_i,
  input  logic              cfg_act_i,
  output logic [NCELLS-1:0] act_o
);
  function automatic int unsigned idx(int unsigned x, int unsigned y, int unsigned z);
    return (z * NY + y) * NX + x;
  endfunction

  for (genvar z = 0; z < NZ; z++) begin : g_z
    for (genvar y = 0; y < NY; y++) begin : g_y
      for (genvar x = 0; x < NX; x++) begin : g_x
        doors_t doors;
        doors_t nbr;
        logic   sel;

        assign sel = cfg_we_i && (cfg_x_i == XW'(x)) && (cfg_y_i == YW'(y)) && (cfg_z_i == ZW'(z));

        always_ff @(posedge clk) begin
          if (!rst_n)   doors <= '0;
          else if (sel) doors <= cfg_doors_i;
        end

        assign nbr[DOOR_W] = (x > 0)      ? act_o[idx(x - 1, y, z)] : 1'b0;
        assign nbr[DOOR_E] = (x < NX - 1) ? act_o[idx(x + 1, y, z)] : 1'b0;
        assign nbr[DOOR_N] = (y > 0)      ? act_o[idx(x, y - 1, z)] : 1'b0;
        assign nbr[DOOR_S] = (y < NY - 1) ? act_o[idx(x, y + 1, z)] : 1'b0;
        assign nbr[DOOR_U] = (z < NZ - 1) ? act_o[idx(x, y, z + 1)] : 1'b0;
        assign nbr[DOOR_L] = (z > 0)      ? act_o[idx(x, y, z - 1)] : 1'b0;

        ca_cell u_cell (
          .clk, .rst_n,
          .step_i    (run_i),
          .load_i    (sel),
          .load_act_i(cfg_act_i),
          .doors_i   (doors),
          .nbr_i     (nbr),
          .act_o     (act_o[idx(x, y, z)])
        );
      end
    end
  end
endmodule
