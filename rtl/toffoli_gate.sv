// toffoli_gate: the three-wire reversible Toffoli gate.
//
// The two control wires y and z pass through unchanged. The target wire x is
// inverted exactly when both controls are 1, so x_o = x ^ (y & z). The gate
// is its own inverse, and the mapping of input vectors to output vectors is
// one-to-one. Purely combinational; no clock. y_o and z_o are plain wires
// from y_i and z_i, which is the gate's definition. The function and wire
// names follow the documented gate symbol.
module toffoli_gate (
  input  logic x_i,  // target
  input  logic y_i,  // control
  input  logic z_i,  // control
  output logic x_o,  // x ^ y z
  output logic y_o,  // y
  output logic z_o   // z
);
  always_comb begin
    x_o = x_i ^ (y_i & z_i);
    y_o = y_i;
    z_o = z_i;
  end
endmodule
