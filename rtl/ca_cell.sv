// ca_cell: one cell of the door-gated cellular automaton.
//
// State: the pulsing bit act_o. The six door bits doors_i are frozen state:
// they are set before a computation and held constant while it runs (here
// they are an input the owner keeps steady). On each clock with step_i = 1
// the cell becomes active if and only if exactly one open door faces a
// neighbour that is active now:
//   act(t+1) = S1(doors & nbr(t)).
// nbr_i carries the neighbours' activations, bit k for the neighbour behind
// door k (see ca_pkg). load_i overrides the rule and writes load_act_i, so a
// host can inject pulses or set up an initial state; with step_i = 0 and no
// load the cell holds. rst_n clears the activation synchronously.
// The rule is the document's; the step/load controls and the reset are this
// design's own additions for driving it as a clocked circuit.
module ca_cell
  import ca_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   step_i,
  input  logic   load_i,
  input  logic   load_act_i,
  input  doors_t doors_i,
  input  doors_t nbr_i,
  output logic   act_o
);
  always_ff @(posedge clk) begin
    if (!rst_n)       act_o <= 1'b0;
    else if (load_i)  act_o <= load_act_i;
    else if (step_i)  act_o <= s1(doors_i & nbr_i);
  end
endmodule
