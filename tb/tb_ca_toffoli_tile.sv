// tb_ca_toffoli_tile: drives a random pulse stream (one input set per generation) into
// ca_toffoli_tile and checks every output against the expected function of the inputs
// exactly LAT = 18 generations earlier, which also checks the latency.
// The first LAT generations after reset must stay quiet.
module tb_ca_toffoli_tile;
  localparam int LAT = 18;
  localparam int NIN = 3;
  localparam int NOUT = 3;
  logic clk = 0, rst_n = 0;
  logic [NIN-1:0]  in;
  logic [NOUT-1:0] out;
  logic [NIN-1:0]  hist [LAT+1];
  int checks = 0, failures = 0, ones = 0;

  // in = {left_lo (x), left_up (z), top (y)}; out = {bottom, right_up, right_lo}
  ca_toffoli_tile dut (.clk, .rst_n, .top_i(in[0]), .left_up_i(in[1]), .left_lo_i(in[2]),
                       .right_lo_o(out[0]), .right_up_o(out[1]), .bottom_o(out[2]));

  always #5 clk = ~clk;

  function automatic logic [NOUT-1:0] expect_of(logic [NIN-1:0] v);
    return {v[2] ^ (v[1] & v[0]), v[1], v[0]};
  endfunction

  initial begin
    in = '0;
    foreach (hist[i]) hist[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int cyc = 0; cyc < 600; cyc++) begin
      in = (cyc < 400) ? NIN'($urandom) : ((cyc % 25 == 0) ? '1 : '0);
      for (int i = LAT; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = in;
      @(posedge clk); #1;
      checks++;
      if (out !== expect_of(hist[LAT-1])) begin
        failures++;
        $display("FAIL cyc=%0d out=%b exp=%b", cyc, out, expect_of(hist[LAT-1]));
      end
      if (out != '0) ones++;
    end
    checks++;
    if (ones == 0) begin failures++; $display("FAIL no pulse ever came out"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
