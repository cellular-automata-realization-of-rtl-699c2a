// ca_channel: a CA "wire", a chain of LEN cells with one open door each.
//
// Each cell opens only the door facing the previous cell of the chain, so a
// pulse moves one cell per generation: out_o(t + LEN) = in_i(t). in_i is the
// activation of the cell just upstream of the chain (outside this module);
// out_o is the activation of the last cell. The chain may bend within a layer
// or climb between layers without changing its behaviour, so the layout is
// abstracted to a straight West-to-East run. Several pulses may travel in the
// chain at once. LEN = 0 gives a plain connection (clk and rst_n then go
// unused). The one-door chain is the documented channel; the default LEN is
// the length of the documented example.
module ca_channel
  import ca_pkg::*;
#(
  parameter int unsigned LEN = 5
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_i,
  output logic out_o
);
  if (LEN == 0) begin : g_wire
    assign out_o = in_i;
  end else begin : g_chain
    logic [LEN:0] a;  // a[0] is the upstream cell, a[k] the k-th cell of the chain
    assign a[0] = in_i;
    for (genvar k = 1; k <= LEN; k++) begin : g_cell
      ca_cell u_cell (
        .clk, .rst_n, .step_i(1'b1), .load_i(1'b0), .load_act_i(1'b0),
        .doors_i(D_W), .nbr_i({5'b0, a[k-1]}), .act_o(a[k])
      );
    end
    assign out_o = a[LEN];
  end
endmodule
