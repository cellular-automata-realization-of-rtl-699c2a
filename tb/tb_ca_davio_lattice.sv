// tb_ca_davio_lattice: the cellular 3 x 3 lattice at its default size.
// Random input sets (variables and constants as pulses) are presented every
// generation; every output (F and all garbage outputs) is compared with the
// reference lattice model applied to the set presented exactly
// LAT = 18 * 5 = 90 generations earlier for F; the garbage outputs leave
// the lattice earlier (bottom[c] after 18 * (3 + c), East outputs of row r
// after 18 * (r + 3)) and are checked at those latencies. A burst of the majority setting
// (C5 only) and a quiet tail follow; quiet inputs must give quiet outputs.
module tb_ca_davio_lattice;
  import davio_ref_pkg::*;
  localparam int ROWS = 3, COLS = 3, TL = 18;
  localparam int LAT = TL * (ROWS + COLS - 1);
  localparam int NIN = 2 * ROWS + COLS;

  logic clk = 0, rst_n = 0;
  logic [ROWS-1:0] vars, left_c, rup, rlo;
  logic [COLS-1:0] top_c, bot;
  logic f;
  logic [NIN-1:0] hist [LAT+1];
  logic [NIN-1:0] cur, old;
  lat_out_t exp_o;
  int checks = 0, failures = 0, ones = 0, maj = 0;

  ca_davio_lattice dut (.clk, .rst_n, .var_i(vars), .left_const_i(left_c), .top_const_i(top_c),
                        .f_o(f), .bottom_o(bot), .right_up_o(rup), .right_lo_o(rlo));

  always #5 clk = ~clk;

  function automatic lat_out_t ref_of(logic [NIN-1:0] v);
    return davio_ref(ROWS, COLS, 8'(v[NIN-1 -: ROWS]), 8'(v[COLS +: ROWS]), 8'(v[COLS-1:0]));
  endfunction

  initial begin
    cur = '0;
    {vars, left_c, top_c} = cur;
    foreach (hist[i]) hist[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int cyc = 0; cyc < 800; cyc++) begin
      if (cyc < 500)       cur = NIN'($urandom);
      else if (cyc < 520)  cur = {3'(cyc), 3'b000, 3'b010};  // C5 only: majority
      else                 cur = '0;
      {vars, left_c, top_c} = cur;
      for (int i = LAT; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = cur;
      @(posedge clk); #1;
      for (int c = 0; c < COLS; c++) begin
        old = hist[TL*(ROWS+c)-1];
        exp_o = ref_of(old);
        checks++;
        if (bot[c] !== exp_o.bottom[c]) begin
          failures++;
          $display("FAIL cyc=%0d bottom[%0d]=%b exp=%b", cyc, c, bot[c], exp_o.bottom[c]);
        end
      end
      for (int r = 0; r < ROWS; r++) begin
        old = hist[TL*(r+COLS)-1];
        exp_o = ref_of(old);
        checks++;
        if (rup[r] !== exp_o.right_up[r] || rlo[r] !== exp_o.right_lo[r]) begin
          failures++;
          $display("FAIL cyc=%0d row %0d east=%b%b exp=%b%b", cyc, r, rup[r], rlo[r],
                   exp_o.right_up[r], exp_o.right_lo[r]);
        end
      end
      old = hist[LAT-1];
      exp_o = ref_of(old);
      checks++;
      if (f !== exp_o.f) begin
        failures++;
        $display("FAIL cyc=%0d f=%b exp=%b", cyc, f, exp_o.f);
      end
      if (f) ones++;
      if (old[COLS-1:0] == 3'b010 && old[COLS +: ROWS] == 3'b000) begin
        checks++;
        maj++;
        if (f !== ((old[8] & old[7]) ^ (old[7] & old[6]) ^ (old[6] & old[8]))) failures++;
      end
    end
    checks++;
    if (ones == 0 || maj == 0) begin
      failures++;
      $display("FAIL coverage ones=%0d majority=%0d", ones, maj);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
