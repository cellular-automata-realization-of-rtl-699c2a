// tb_toffoli_gate: checks the Toffoli gate against its eight-row truth table.
// The expected rows are written out as constants (x y z -> x' y' z').
module tb_toffoli_gate;
  logic x, y, z, xo, yo, zo;
  int checks = 0, failures = 0;

  toffoli_gate dut (.x_i(x), .y_i(y), .z_i(z), .x_o(xo), .y_o(yo), .z_o(zo));

  // {x, y, z, x', y', z'} for inputs 000 .. 111
  localparam logic [5:0] TABLE [8] = '{
    6'b000_000, 6'b001_001, 6'b010_010, 6'b011_111,
    6'b100_100, 6'b101_101, 6'b110_110, 6'b111_011
  };

  initial begin
    for (int i = 0; i < 8; i++) begin
      {x, y, z} = TABLE[i][5:3];
      #1;
      checks++;
      if ({xo, yo, zo} !== TABLE[i][2:0]) begin
        failures++;
        $display("FAIL in=%b out=%b exp=%b", TABLE[i][5:3], {xo, yo, zo}, TABLE[i][2:0]);
      end
    end
    // reversibility: applying the gate twice restores the input
    for (int i = 0; i < 8; i++) begin
      {x, y, z} = 3'(i);
      #1;
      {x, y, z} = {xo, yo, zo};
      #1;
      checks++;
      if ({xo, yo, zo} !== 3'(i)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
