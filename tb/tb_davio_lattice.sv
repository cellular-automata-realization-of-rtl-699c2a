// tb_davio_lattice: all 64 constant settings x 8 input vectors of the 3 x 3
// lattice against the reference model, the majority example (C5 = 1), and
// the claim that the constant settings yield all 16 symmetric functions of
// three variables. Row order top to bottom is C, B, A.
module tb_davio_lattice;
  import davio_ref_pkg::*;
  localparam int ROWS = 3, COLS = 3;

  logic [ROWS-1:0] vars, left_c, rup, rlo;
  logic [COLS-1:0] top_c, bot;
  logic f;
  int checks = 0, failures = 0;

  davio_lattice #(.ROWS(ROWS), .COLS(COLS)) dut (
    .var_i(vars), .left_const_i(left_c), .top_const_i(top_c),
    .f_o(f), .bottom_o(bot), .right_up_o(rup), .right_lo_o(rlo));

  lat_out_t exp_o;
  logic [7:0] tt;
  logic seen [256];
  int nfunc, nsym;
  logic a, b, c;

  initial begin
    foreach (seen[i]) seen[i] = 1'b0;
    for (int k = 0; k < 64; k++) begin
      // k bit i-1 = Ci; left column rows 0..2 = C3, C2, C1; top = C4, C5, C6
      left_c = {k[0], k[1], k[2]};
      top_c  = {k[5], k[4], k[3]};
      tt = '0;
      for (int v = 0; v < 8; v++) begin
        {a, b, c} = 3'(v);
        vars = {a, b, c};
        #1;
        exp_o = davio_ref(ROWS, COLS, 8'(vars), 8'(left_c), 8'(top_c));
        checks++;
        if (f !== exp_o.f || bot !== exp_o.bottom[COLS-1:0] ||
            rup !== exp_o.right_up[ROWS-1:0] || rlo !== exp_o.right_lo[ROWS-1:0]) begin
          failures++;
          $display("FAIL k=%0d v=%0d f=%b exp=%b", k, v, f, exp_o.f);
        end
        tt[v] = f;
        if (k == 16) begin  // C5 = 1 only: majority
          checks++;
          if (f !== ((a & b) ^ (b & c) ^ (c & a))) begin
            failures++;
            $display("FAIL majority v=%0d f=%b", v, f);
          end
        end
      end
      seen[tt] = 1'b1;
    end
    nfunc = 0;
    nsym  = 0;
    for (int t = 0; t < 256; t++) begin
      if (seen[t]) begin
        logic [7:0] tv;
        tv = 8'(t);
        nfunc++;
        // symmetric: value depends only on the number of ones (vectors 1,2,4 / 3,5,6)
        if (tv[1] == tv[2] && tv[2] == tv[4] && tv[3] == tv[5] && tv[5] == tv[6]) nsym++;
      end
    end
    checks++;
    if (nfunc != 16 || nsym != 16) begin
      failures++;
      $display("FAIL functions=%0d symmetric=%0d", nfunc, nsym);
    end
    $display("distinct functions %0d, symmetric %0d", nfunc, nsym);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
