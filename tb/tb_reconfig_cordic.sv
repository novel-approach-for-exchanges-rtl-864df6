// tb_reconfig_cordic: end-to-end test of the generalized reconfigurable
// CORDIC at its default parameters.
//
// Random operand sets of all four kinds (circular/hyperbolic x rotation/
// vectoring) are streamed into the pipelined engine, one per clock with
// occasional bubbles, and the same kind of traffic is run through the
// recursive engine with its valid/ready handshake. Every result is compared
// with the floating-point reference of cordic_ref_pkg (tolerance TOL LSBs),
// and the latency of each engine is checked: NSTAGE + 2 clocks for the
// pipeline, NSTAGE clocks from acceptance for the recursive engine. The test
// also counts how often each mechanism happened (every quadrant and the
// reflection of the rotation preprocessing, the swap and sign folds of the
// vectoring preprocessing, trajectory and mode switches between back-to-back
// records, saturation, pipeline bubbles, recursive back-pressure) and fails a
// mechanism that never happened.
module tb_reconfig_cordic;
  import cordic_pkg::*;
  import cordic_ref_pkg::*;

  localparam int  N_PIPE = 600;
  localparam int  N_REC  = 150;
  localparam real TOL    = 6.0 / real'(1 << F);

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  p_in_valid = 1'b0;
  traj_e p_traj = CIRC;
  mode_e p_mode = ROT;
  io_t   p_x = '0, p_y = '0, p_z = '0;
  logic  p_out_valid;
  traj_e p_out_traj;
  mode_e p_out_mode;
  io_t   p_x_o, p_y_o, p_z_o;
  logic  p_sat;
  logic  r_in_valid = 1'b0;
  logic  r_in_ready;
  traj_e r_traj = CIRC;
  mode_e r_mode = ROT;
  io_t   r_x = '0, r_y = '0, r_z = '0;
  logic  r_out_valid;
  io_t   r_x_o, r_y_o, r_z_o;
  logic  r_sat;

  reconfig_cordic dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct {
    traj_e  t;
    mode_e  m;
    io_t    x, y, z;
    real    ex, ey, ez;
    logic   esat;
  } op_t;

  op_t pq[$];  // operands in flight in the pipeline

  // mechanism counters
  int n_quad[4], n_refl, n_swap, n_negx, n_negy, n_traj_sw, n_mode_sw, n_sat, n_bubble;
  int n_kind[4], n_backpressure, n_rec_done, n_pipe_done;

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endfunction

  function automatic op_t make_op(input int kind, input bit force_sat);
    op_t o;
    real x, y, z, r, a, b;
    o.t = kind[1] ? HYP : CIRC;
    o.m = kind[0] ? VEC : ROT;
    case (kind)
      0: begin x = rnd(-1.4, 1.4); y = rnd(-1.4, 1.4); z = rnd(-PI, PI - 0.001); end
      1: begin x = rnd(-2.5, 2.5); y = rnd(-2.5, 2.5); z = 0.0; end
      2: begin x = rnd(-0.7, 0.7); y = rnd(-0.7, 0.7); z = rnd(-0.98, 0.98); end
      default: begin x = rnd(0.5, 2.5); r = rnd(-0.75, 0.75); y = x * r; z = 0.0; end
    endcase
    if (force_sat) begin
      o.t = CIRC; o.m = ROT; x = 2.9; y = 2.9; z = PI / 4.0;
    end
    o.x = r2io(x); o.y = r2io(y); o.z = r2io(z);
    x = io2r(o.x); y = io2r(o.y); z = io2r(o.z);
    if (o.m == ROT) begin
      rot_ref(o.t, x, y, z, a, b);
      o.esat = (a > 3.999) || (a < -4.0) || (b > 3.999) || (b < -4.0);
      o.ex = sat_r(a); o.ey = sat_r(b); o.ez = 0.0;
    end else begin
      vec_ref(o.t, x, y, a, b);
      o.esat = 1'b0;
      o.ex = a; o.ey = 0.0; o.ez = b;
    end
    return o;
  endfunction

  function automatic void note_mechanisms(input op_t o);
    real z, t;
    if (o.t == CIRC && o.m == ROT) begin
      z = io2r(o.z);
      if (z < 0.0) z = z + 2.0 * PI;
      n_quad[$floor(z / (PI / 2.0)) > 3 ? 3 : int'($floor(z / (PI / 2.0)))]++;
      t = z - (PI / 2.0) * $floor(z / (PI / 2.0));
      if (t > PI / 4.0 + 0.001) n_refl++;
    end
    if (o.t == CIRC && o.m == VEC) begin
      if (o.x < 0) n_negx++;
      if (o.y < 0) n_negy++;
      if ((o.y < 0 ? -o.y : o.y) > (o.x < 0 ? -o.x : o.x)) n_swap++;
    end
    n_kind[{o.t == HYP, o.m == VEC}]++;
  endfunction

  function automatic void compare(input op_t o, input io_t xo, input io_t yo, input io_t zo,
                                  input logic sat, input string eng);
    string s;
    s = $sformatf("%s t=%s m=%s in=(%f,%f,%f) got=(%f,%f,%f) exp=(%f,%f,%f)", eng,
                  o.t.name(), o.m.name(), io2r(o.x), io2r(o.y), io2r(o.z),
                  io2r(xo), io2r(yo), io2r(zo), o.ex, o.ey, o.ez);
    check(fabs(io2r(xo) - o.ex) <= TOL, {"x ", s});
    check(fabs(io2r(yo) - o.ey) <= TOL, {"y ", s});
    if (o.m == VEC) check(fabs(ang_diff(io2r(zo), o.ez)) <= TOL, {"z ", s});
    else            check(fabs(io2r(zo)) <= TOL, {"z residue ", s});
    check(sat == o.esat, {"sat ", s});
  endfunction

  // pipelined engine: driver
  initial begin : drive_pipe
    op_t o;
    int  prev_kind;
    bit  have_prev, gap;
    have_prev = 0;
    gap = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < N_PIPE; i++) begin
      if ($urandom_range(0, 9) == 0) begin
        p_in_valid <= 1'b0;
        gap = 1;
        @(posedge clk);
      end
      o = make_op($urandom_range(0, 3), (i % 97) == 50);
      if (have_prev && !gap) begin
        if ((o.t == HYP) != prev_kind[1]) n_traj_sw++;
        if ((o.m == VEC) != prev_kind[0]) n_mode_sw++;
      end
      if (gap && have_prev) n_bubble++;
      gap = 0;
      prev_kind = {30'd0, o.t == HYP, o.m == VEC};
      have_prev = 1;
      note_mechanisms(o);
      pq.push_back(o);
      p_in_valid <= 1'b1;
      p_traj <= o.t; p_mode <= o.m; p_x <= o.x; p_y <= o.y; p_z <= o.z;
      @(posedge clk);
    end
    p_in_valid <= 1'b0;
  end

  // Latency stamps, all taken at clock edges: a pipeline operand is sampled
  // at edge S, the output register is loaded at edge S + NSTAGE + 1 and the
  // monitor sees out_valid at edge S + NSTAGE + 2. A recursive operation
  // accepted at edge A has out_valid set at edge A + NSTAGE, seen at
  // A + NSTAGE + 1.
  longint p_stamp[$];
  longint r_stamp;

  always @(posedge clk) begin
    if (rst_n && p_in_valid) p_stamp.push_back(cycle);
    if (rst_n && r_in_valid && r_in_ready) r_stamp <= cycle;
  end

  // pipelined engine: monitor
  always @(posedge clk) begin
    if (rst_n && p_out_valid) begin
      op_t    o;
      longint st;
      if (pq.size() == 0 || p_stamp.size() == 0) begin
        check(0, "pipe output without input");
      end else begin
        o  = pq.pop_front();
        st = p_stamp.pop_front();
        check(cycle - st == longint'(NSTAGE + 2),
              $sformatf("pipe latency %0d, expected %0d", cycle - st, NSTAGE + 2));
        check(p_out_traj == o.t && p_out_mode == o.m, "pipe sideband");
        compare(o, p_x_o, p_y_o, p_z_o, p_sat, "pipe");
        if (p_sat) n_sat++;
        n_pipe_done++;
      end
    end
  end

  // recursive engine: driven and checked at falling edges
  initial begin : run_rec
    op_t o;
    @(posedge rst_n);
    for (int i = 0; i < N_REC; i++) begin
      o = make_op(i % 4, (i % 50) == 25);
      @(negedge clk);
      r_in_valid = 1'b1;
      r_traj = o.t; r_mode = o.m; r_x = o.x; r_y = o.y; r_z = o.z;
      while (!r_in_ready) @(negedge clk);
      @(negedge clk);                       // accepted at the edge in between
      if (i % 3 == 0) begin                 // keep asking: the engine must refuse
        if (!r_in_ready) n_backpressure++;
        check(!r_in_ready, "rec ready while busy");
        @(negedge clk);
      end
      r_in_valid = 1'b0;
      while (!r_out_valid) @(negedge clk);
      check(cycle - r_stamp == longint'(NSTAGE + 1), $sformatf("rec latency %0d", cycle - r_stamp));
      compare(o, r_x_o, r_y_o, r_z_o, r_sat, "rec");
      n_rec_done++;
    end
  end

  initial begin : finish
    wait (n_pipe_done == N_PIPE && n_rec_done == N_REC);
    repeat (5) @(posedge clk);
    $display("mechanisms: quad=%0d/%0d/%0d/%0d refl=%0d swap=%0d negx=%0d negy=%0d",
             n_quad[0], n_quad[1], n_quad[2], n_quad[3], n_refl, n_swap, n_negx, n_negy);
    $display("mechanisms: traj_switch=%0d mode_switch=%0d sat=%0d bubble=%0d backpressure=%0d",
             n_traj_sw, n_mode_sw, n_sat, n_bubble, n_backpressure);
    $display("kinds: circ_rot=%0d circ_vec=%0d hyp_rot=%0d hyp_vec=%0d",
             n_kind[0], n_kind[1], n_kind[2], n_kind[3]);
    foreach (n_quad[i]) check(n_quad[i] > 0, "quadrant never used");
    foreach (n_kind[i]) check(n_kind[i] > 0, "operation kind never used");
    check(n_refl > 0, "reflection never used");
    check(n_swap > 0 && n_negx > 0 && n_negy > 0, "vectoring fold never used");
    check(n_traj_sw > 0, "trajectory switch never happened");
    check(n_mode_sw > 0, "mode switch never happened");
    check(n_sat > 0, "saturation never happened");
    check(n_bubble > 0, "pipeline bubble never happened");
    check(n_backpressure > 0, "recursive back-pressure never happened");
    check(pq.size() == 0, "pipe results missing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
