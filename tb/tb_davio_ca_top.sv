// tb_davio_ca_top: end-to-end test of the top. The lattice runs at its
// default size; the automaton space edge is reduced from 24 to 8 to keep the
// build short.
//   Lattice: all 64 constant settings x 8 input vectors are launched on
//   back-to-back clocks, then random launches with random gaps. Every clock,
//   the CA output f_o must equal F of the set launched 90 clocks earlier
//   (taken both from the Boolean lattice at launch and from the reference
//   model), and must be quiet when nothing was launched then. The 64
//   settings must give exactly the 16 symmetric functions of A, B, C, and
//   C5 alone must give the majority function.
//   Space: an Eeckhaut AND gate (six cells) and an EXOR cell are written
//   into the automaton and run on all operand cases.
// Each mechanism is counted and one that never happened counts as a failure.
module tb_davio_ca_top;
  import ca_pkg::*;
  import davio_ref_pkg::*;
  localparam int LAT = 90;
  localparam int N = 8;
  localparam int SW = $clog2(N);

  logic clk = 0, rst_n = 0;
  logic launch = 0, a = 0, b = 0, c = 0;
  logic [5:0] cst = '0;
  logic f_logic, f;
  logic [2:0] cbot, crup, crlo;
  logic run = 0, we = 0, cact = 0;
  logic [SW-1:0] cx = '0, cy = '0, cz = '0;
  doors_t cdoors = '0;
  logic [N*N*N-1:0] act;

  davio_ca_top #(.SPACE_N(N)) dut (
    .clk, .rst_n, .launch_i(launch), .a_i(a), .b_i(b), .c_i(c), .const_i(cst),
    .f_logic_o(f_logic), .f_o(f), .ca_bottom_o(cbot), .ca_right_up_o(crup), .ca_right_lo_o(crlo),
    .space_run_i(run), .space_cfg_we_i(we), .space_cfg_x_i(cx), .space_cfg_y_i(cy),
    .space_cfg_z_i(cz), .space_cfg_doors_i(cdoors), .space_cfg_act_i(cact), .space_act_o(act));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_launch = 0, n_b2b = 0, n_pulse = 0, n_zero = 0, n_idle = 0, n_major = 0;
  int n_and_fire = 0, n_and_block = 0, n_exor_fire = 0, n_exor_cancel = 0;

  // expected output pipeline: [valid, expected F]
  logic [1:0] pipe [LAT];
  logic prev_launch = 0;
  logic [7:0] tt [64];
  logic seen [256];

  task automatic tick();
    logic ef;
    lat_out_t r;
    #1;  // let the combinational lattice settle on the new inputs
    // expected value of this launch, from the reference model
    r = davio_ref(3, 3, {5'b0, a, b, c}, {5'b0, cst[0], cst[1], cst[2]},
                  {5'b0, cst[5], cst[4], cst[3]});
    ef = r.f;
    if (launch) begin
      checks++;
      if (f_logic !== ef) begin
        failures++;
        $display("FAIL Boolean lattice abc=%b%b%b C=%b f=%b exp=%b", a, b, c, cst, f_logic, ef);
      end
      n_launch++;
      if (prev_launch) n_b2b++;
    end
    for (int i = LAT - 1; i > 0; i--) pipe[i] = pipe[i-1];
    pipe[0] = {launch, launch & ef};
    prev_launch = launch;
    @(posedge clk); #1;
    checks++;
    if (f !== pipe[LAT-1][0]) begin
      failures++;
      $display("FAIL CA lattice f=%b exp=%b (launched=%b)", f, pipe[LAT-1][0], pipe[LAT-1][1]);
    end
    if (pipe[LAT-1][1]) begin
      if (f) n_pulse++; else n_zero++;
    end else n_idle++;
    checks++;
    if (cbot[2] !== f) failures++;
  endtask

  task automatic put(int x, int y, int z, doors_t d, logic v);
    run = 0; we = 1; cx = SW'(x); cy = SW'(y); cz = SW'(z); cdoors = d; cact = v;
    @(posedge clk); #1;
    we = 0;
  endtask

  task automatic gens(int n);
    run = 1;
    repeat (n) @(posedge clk);
    #1 run = 0;
  endtask

  function automatic int idx(int x, int y, int z);
    return (z * N + y) * N + x;
  endfunction

  int nf, ns;
  logic [7:0] tv;

  initial begin
    foreach (pipe[i]) pipe[i] = '0;
    foreach (seen[i]) seen[i] = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    // ---- lattice: exhaustive, back to back ----
    for (int k = 0; k < 64; k++) begin
      for (int v = 0; v < 8; v++) begin
        launch = 1; cst = 6'(k); {a, b, c} = 3'(v);
        #1;
        tt[k][v] = f_logic;
        if (k == 16) begin
          checks++;
          n_major++;
          if (f_logic !== ((a & b) ^ (b & c) ^ (c & a))) failures++;
        end
        tick();
      end
    end
    // ---- random launches with gaps ----
    for (int i = 0; i < 400; i++) begin
      launch = ($urandom % 3) != 0;
      cst = 6'($urandom); {a, b, c} = 3'($urandom);
      tick();
    end
    launch = 0;
    repeat (LAT + 5) tick();

    nf = 0; ns = 0;
    for (int k = 0; k < 64; k++) seen[tt[k]] = 1'b1;
    for (int t = 0; t < 256; t++) if (seen[t]) begin
      tv = 8'(t);
      nf++;
      if (tv[1] == tv[2] && tv[2] == tv[4] && tv[3] == tv[5] && tv[5] == tv[6]) ns++;
    end
    checks++;
    if (nf != 16 || ns != 16) begin
      failures++;
      $display("FAIL %0d functions, %0d symmetric", nf, ns);
    end

    // ---- space: Eeckhaut gate (x row y = 2, p/q/e row y = 3, y row y = 4) ----
    put(3, 2, 7, D_W, 0);              // x1
    put(2, 3, 7, D_N, 0);              // p
    put(3, 3, 7, D_N | D_W | D_S, 0);  // q
    put(4, 3, 7, D_W | D_S, 0);        // e
    put(3, 4, 7, D_W, 0);              // y1
    put(4, 4, 7, D_W, 0);              // y2
    // EXOR cell at (5, 6, 3)
    put(5, 6, 3, D_W | D_E, 0);
    for (int v = 0; v < 4; v++) begin
      put(2, 2, 7, '0, v[0]);          // x
      put(2, 4, 7, '0, v[1]);          // y
      put(4, 6, 3, '0, v[0]);
      put(6, 6, 3, '0, v[1]);
      gens(1);
      checks++;
      if (act[idx(5, 6, 3)] !== (v[0] ^ v[1])) failures++;
      if (v == 3) n_exor_cancel += !act[idx(5, 6, 3)];
      else if (v != 0) n_exor_fire += act[idx(5, 6, 3)];
      gens(2);
      checks++;
      if (act[idx(4, 3, 7)] !== (v[0] & v[1])) begin
        failures++;
        $display("FAIL space AND x=%b y=%b e=%b", v[0], v[1], act[idx(4, 3, 7)]);
      end
      if (v == 3) n_and_fire += act[idx(4, 3, 7)];
      else if (v != 0) n_and_block += !act[idx(4, 3, 7)];
      gens(3);
      checks++;
      if (act != '0) begin failures++; $display("FAIL space not empty"); end
    end

    $display("launches %0d (back-to-back %0d), F pulses %0d, F zeros %0d, idle %0d, majority %0d",
             n_launch, n_b2b, n_pulse, n_zero, n_idle, n_major);
    $display("functions %0d (symmetric %0d); space AND fire %0d block %0d, EXOR fire %0d cancel %0d",
             nf, ns, n_and_fire, n_and_block, n_exor_fire, n_exor_cancel);
    if (n_launch == 0)      begin failures++; $display("FAIL never launched"); end
    if (n_b2b == 0)         begin failures++; $display("FAIL no back-to-back launch"); end
    if (n_pulse == 0)       begin failures++; $display("FAIL no F pulse"); end
    if (n_zero == 0)        begin failures++; $display("FAIL no F zero"); end
    if (n_idle == 0)        begin failures++; $display("FAIL no idle clock"); end
    if (n_major == 0)       begin failures++; $display("FAIL majority never set"); end
    if (n_and_fire == 0)    begin failures++; $display("FAIL space AND never fired"); end
    if (n_and_block == 0)   begin failures++; $display("FAIL space AND never blocked"); end
    if (n_exor_fire == 0)   begin failures++; $display("FAIL space EXOR never fired"); end
    if (n_exor_cancel == 0) begin failures++; $display("FAIL space EXOR never cancelled"); end
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
