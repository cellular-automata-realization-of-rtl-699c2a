// tb_ca_exor: drives a random pulse stream (one input set per generation) into
// ca_exor and checks every output against the expected function of the inputs
// exactly LAT = 1 generations earlier, which also checks the latency.
// The first LAT generations after reset must stay quiet.
module tb_ca_exor;
  localparam int LAT = 1;
  localparam int NIN = 2;
  localparam int NOUT = 1;
  logic clk = 0, rst_n = 0;
  logic [NIN-1:0]  in;
  logic [NOUT-1:0] out;
  logic [NIN-1:0]  hist [LAT+1];
  int checks = 0, failures = 0, ones = 0;

  ca_exor dut (.clk, .rst_n, .x_i(in[0]), .y_i(in[1]), .e_o(out[0]));

  always #5 clk = ~clk;

  function automatic logic [NOUT-1:0] expect_of(logic [NIN-1:0] v);
    return v[0] ^ v[1];
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
