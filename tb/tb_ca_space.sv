// tb_ca_space: programs door patterns into an 8 x 8 x 8 automaton (the edge
// is reduced from the default 24 only to keep the build short) and
// compares the complete activation state, generation by generation, with the
// expected set of active cells.
//   1. Two-layer channel: upper source -> lower cell (door U) -> lower cell
//      (door W) -> upper cell (door L); one active cell per generation.
//   2. EXOR cell between two sources: fires for one active source, stays
//      dark for two.
//   3. The two-layer cellular Toffoli layout (same cell map as ca_toffoli),
//      all 8 input vectors: after 7 generations exactly the output cells of
//      x ^ yz, y, z are active, and one generation later the space is empty.
//   4. run_i = 0 holds the state.
//   5. One-layer channel with a bend: the pulse visits (0,0) (1,0) (1,1)
//      (2,1) (2,0) (3,0) in generations 0..5, one cell at a time.
module tb_ca_space;
  import ca_pkg::*;
  localparam int N = 8;
  localparam int NC = N * N * N;
  localparam int SW = $clog2(N);

  logic clk = 0, rst_n = 0, run = 0, we = 0, cact = 0;
  logic [SW-1:0] cx, cy, cz;
  doors_t cdoors;
  logic [NC-1:0] act, expv;
  int checks = 0, failures = 0;

  ca_space #(.NX(N), .NY(N), .NZ(N)) dut (.clk, .rst_n, .run_i(run), .cfg_we_i(we), .cfg_x_i(cx), .cfg_y_i(cy),
                .cfg_z_i(cz), .cfg_doors_i(cdoors), .cfg_act_i(cact), .act_o(act));

  always #5 clk = ~clk;

  function automatic int idx(int x, int y, int z);
    return (z * N + y) * N + x;
  endfunction

  task automatic put(int x, int y, int z, doors_t d, logic a);
    run = 0; we = 1; cx = SW'(x); cy = SW'(y); cz = SW'(z); cdoors = d; cact = a;
    @(posedge clk); #1;
    we = 0;
  endtask

  task automatic step(int n);
    run = 1;
    repeat (n) @(posedge clk);
    #1 run = 0;
  endtask

  task automatic expect_state(string what);
    checks++;
    if (act !== expv) begin
      failures++;
      $display("FAIL %s: %0d active, %0d expected", what, $countones(act), $countones(expv));
    end
  endtask

  // Toffoli layout: column c -> x = OX + c, row r -> y = OY + r, upper z = 1, lower z = 0
  localparam int OX = 2, OY = 1;
  task automatic tof(int c, int r, int layer, doors_t d);
    put(OX + c, OY + r, layer, d, 1'b0);
  endtask

  logic tx, ty, tz;

  initial begin
    cx = '0; cy = '0; cz = '0; cdoors = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    expv = '0;
    expect_state("after reset");

    // 1. two-layer channel at x = 1..2, y = 1, z = 4 (upper) / 3 (lower)
    put(2, 1, 4, D_L, 1'b0);
    put(1, 1, 3,  D_U, 1'b0);
    put(2, 1, 3,  D_W, 1'b0);
    put(1, 1, 4, '0,  1'b1);   // source pulse
    expv = '0; expv[idx(1, 1, 4)] = 1'b1; expect_state("channel t0");
    step(1); expv = '0; expv[idx(1, 1, 3)]  = 1'b1; expect_state("channel t1");
    step(1); expv = '0; expv[idx(2, 1, 3)]  = 1'b1; expect_state("channel t2");
    step(1); expv = '0; expv[idx(2, 1, 4)] = 1'b1; expect_state("channel t3");
    // 4. hold
    repeat (3) @(posedge clk); #1; expect_state("hold");
    step(1); expv = '0; expect_state("channel end");

    // 2. EXOR: e at (5, 6, 6), sources West and East of it
    put(5, 6, 6, D_W | D_E, 1'b0);
    for (int v = 1; v < 4; v++) begin
      put(4, 6, 6, '0, v[0]);
      put(6, 6, 6, '0, v[1]);
      step(1);
      expv = '0; expv[idx(5, 6, 6)] = v[0] ^ v[1];
      expect_state("exor");
      step(1); expv = '0; expect_state("exor end");
    end

    // 3. cellular Toffoli
    // upper layer (z = 1): Eeckhaut gate, product path, outputs
    tof(1, 0, 1, D_W);             // z row
    tof(2, 0, 1, D_W);
    tof(0, 1, 1, D_S);             // p: looks at y
    tof(1, 1, 1, D_N | D_W | D_S); // q
    tof(2, 1, 1, D_W | D_N);       // e: AND
    tof(1, 2, 1, D_W);             // second y cell
    tof(2, 2, 1, D_N);             // a1
    tof(2, 3, 1, D_N);             // a2
    tof(1, 4, 1, D_L);             // xu
    tof(2, 4, 1, D_W | D_N);       // xr: EXOR
    tof(3, 4, 1, D_W);             // x out
    tof(3, 2, 1, D_L);             // y out
    tof(3, 0, 1, D_L);             // z out
    // lower layer (z = 0): detours
    tof(0, 0, 0, D_U); tof(0, 1, 0, D_N); tof(1, 1, 0, D_W); tof(1, 0, 0, D_S);
    tof(2, 0, 0, D_W); tof(3, 0, 0, D_W);
    tof(1, 2, 0, D_U); tof(2, 2, 0, D_W); tof(2, 1, 0, D_S); tof(3, 1, 0, D_W);
    tof(3, 2, 0, D_N);
    tof(0, 4, 0, D_U); tof(0, 3, 0, D_S); tof(1, 3, 0, D_W); tof(1, 4, 0, D_N);
    for (int v = 0; v < 8; v++) begin
      {tx, ty, tz} = 3'(v);
      put(OX, OY + 4, 1, '0, tx);
      put(OX, OY + 2, 1, '0, ty);
      put(OX, OY + 0, 1, '0, tz);
      step(7);
      expv = '0;
      expv[idx(OX + 3, OY + 4, 1)] = tx ^ (ty & tz);
      expv[idx(OX + 3, OY + 2, 1)] = ty;
      expv[idx(OX + 3, OY + 0, 1)] = tz;
      expect_state($sformatf("toffoli xyz=%b", 3'(v)));
      step(1); expv = '0; expect_state("toffoli end");
    end

    // 5. bent channel in layer z = 7, rows y = 0 (top) and 1
    put(1, 0, 7, D_W, 1'b0);
    put(1, 1, 7, D_N, 1'b0);
    put(2, 1, 7, D_W, 1'b0);
    put(2, 0, 7, D_S, 1'b0);
    put(3, 0, 7, D_W, 1'b0);
    put(0, 0, 7, '0,  1'b1);
    expv = '0; expv[idx(0, 0, 7)] = 1'b1; expect_state("bent channel t0");
    step(1); expv = '0; expv[idx(1, 0, 7)] = 1'b1; expect_state("bent channel t1");
    step(1); expv = '0; expv[idx(1, 1, 7)] = 1'b1; expect_state("bent channel t2");
    step(1); expv = '0; expv[idx(2, 1, 7)] = 1'b1; expect_state("bent channel t3");
    step(1); expv = '0; expv[idx(2, 0, 7)] = 1'b1; expect_state("bent channel t4");
    step(1); expv = '0; expv[idx(3, 0, 7)] = 1'b1; expect_state("bent channel t5");
    step(1); expv = '0; expect_state("bent channel end");

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
