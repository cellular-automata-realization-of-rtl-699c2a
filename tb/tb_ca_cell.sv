// tb_ca_cell: random door sets and neighbour activations against the S1 rule
// (count of open doors facing active neighbours equals one), plus the hold
// (step_i = 0), load and reset behaviour.
module tb_ca_cell;
  import ca_pkg::*;
  logic clk = 0, rst_n = 0, step = 0, load = 0, load_act = 0, act;
  doors_t doors, nbr;
  int checks = 0, failures = 0;
  logic expv, prev;
  int n;

  ca_cell dut (.clk, .rst_n, .step_i(step), .load_i(load), .load_act_i(load_act),
               .doors_i(doors), .nbr_i(nbr), .act_o(act));

  always #5 clk = ~clk;

  task automatic chk(input logic e, input string what);
    checks++;
    if (act !== e) begin
      failures++;
      $display("FAIL %s: act=%b exp=%b doors=%b nbr=%b", what, act, e, doors, nbr);
    end
  endtask

  initial begin
    doors = '0; nbr = '0;
    @(posedge clk); @(posedge clk); #1;
    chk(1'b0, "reset");
    rst_n = 1; step = 1;
    for (int i = 0; i < 2000; i++) begin
      doors = doors_t'($urandom);
      nbr   = doors_t'($urandom);
      n = 0;
      for (int k = 0; k < 6; k++) if (doors[k] && nbr[k]) n++;
      expv = (n == 1);
      @(posedge clk); #1;
      chk(expv, "rule");
    end
    // hold while step is low
    doors = D_W; nbr = 6'b000001;
    @(posedge clk); #1;
    prev = act;
    step = 0; nbr = '0;
    repeat (3) begin @(posedge clk); #1; chk(prev, "hold"); end
    // load overrides
    load = 1; load_act = ~prev;
    @(posedge clk); #1; chk(~prev, "load");
    load = 0; step = 1; doors = '1; nbr = '1;
    @(posedge clk); #1; chk(1'b0, "six active");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
