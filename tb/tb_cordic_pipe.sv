// tb_cordic_pipe: the pipelined micro-rotation unit on its own (no pre- or
// postprocessing). One record per clock, random mix of circular/hyperbolic
// rotation (angle in [-0.98, 0.98]) and vectoring (x > 0, angle within the
// same range); results against the exact reference within 2 output LSBs,
// latency n_stage(BSHIFT) clocks, the octant records passed through
// unchanged, and a bubble in the valid stream must stay a bubble. Two units
// take the same stream: basic-shift 2 (14 stages) and basic-shift 3
// (17 stages).
module tb_cordic_pipe;
  import cordic_pkg::*;
  import cordic_ref_pkg::*;

  localparam int  N   = 800;
  localparam real TOL = 2.0 / real'(1 << F);

  logic   clk = 1'b0, rst_n = 1'b0;
  localparam int NB = 2;
  localparam int BS[NB] = '{2, 3};

  stage_t st_i;
  stage_t st_o[NB];
  int checks = 0, failures = 0;
  int done[NB];
  longint cycle = 0;


  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct {
    stage_t s;
    real    ex, ey, ez;
    longint c;
  } exp_t;
  exp_t q[NB][$];

  function automatic void chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endfunction

  initial begin
    exp_t e;
    real  x, y, a, m;
    st_i = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      if (n % 13 == 7) begin
        st_i.valid = 1'b0;
        continue;
      end
      e.s       = stage_t'({$urandom, $urandom, $urandom});
      e.s.valid = 1'b1;
      e.s.traj  = traj_e'($urandom_range(0, 1));
      e.s.mode  = mode_e'($urandom_range(0, 1));
      if (e.s.mode == ROT) begin
        x = rnd(-0.7, 0.7); y = rnd(-0.7, 0.7); a = rnd(-0.98, 0.98);
        e.s.x = r2w(x); e.s.y = r2w(y); e.s.z = r2w(a);
        rot_ref(e.s.traj, w2r(e.s.x), w2r(e.s.y), w2r(e.s.z), e.ex, e.ey);
        e.ez = 0.0;
      end else begin
        if (e.s.traj == CIRC) begin
          m = rnd(0.2, 2.0); a = rnd(-0.95, 0.95); x = m * $cos(a); y = m * $sin(a);
        end else begin
          x = rnd(0.5, 2.0); y = x * rnd(-0.74, 0.74);
        end
        e.s.x = r2w(x); e.s.y = r2w(y); e.s.z = '0;
        vec_ref(e.s.traj, w2r(e.s.x), w2r(e.s.y), e.ex, e.ez);
        e.ey = 0.0;
      end
      e.c = cycle;
      foreach (q[g]) q[g].push_back(e);
      st_i = e.s;
    end
    @(negedge clk);
    st_i.valid = 1'b0;
  end

  for (genvar g = 0; g < NB; g++) begin : g_dut
    localparam int LAT = n_stage(BS[g]);

    cordic_pipe #(.BSHIFT(BS[g])) dut (.clk(clk), .rst_n(rst_n), .st_i(st_i), .st_o(st_o[g]));

    always @(posedge clk) begin
      if (rst_n && st_o[g].valid) begin
        exp_t e;
        if (q[g].size() == 0) chk(0, "output without input");
        else begin
          e = q[g].pop_front();
          // stamped between edges: sampled at the next edge, out of the last
          // stage LAT edges later
          chk(cycle - e.c == longint'(LAT), $sformatf("bs%0d latency %0d", BS[g], cycle - e.c));
          chk(st_o[g].traj == e.s.traj && st_o[g].mode == e.s.mode &&
              st_o[g].roct == e.s.roct && st_o[g].voct == e.s.voct, "sideband");
          chk(fabs(w2r(st_o[g].x) - e.ex) <= TOL && fabs(w2r(st_o[g].y) - e.ey) <= TOL &&
              fabs(w2r(st_o[g].z) - e.ez) <= TOL,
              $sformatf("bs%0d %s %s got (%f,%f,%f) exp (%f,%f,%f)", BS[g], e.s.traj.name(),
                        e.s.mode.name(), w2r(st_o[g].x), w2r(st_o[g].y), w2r(st_o[g].z),
                        e.ex, e.ey, e.ez));
          done[g]++;
        end
      end
    end
  end

  initial begin
    wait (done[0] == N - (N + 5) / 13 && done[1] == N - (N + 5) / 13);
    repeat (20) @(posedge clk);
    foreach (q[g]) chk(q[g].size() == 0, "results missing");
    chk(n_stage(2) == 14 && n_stage(3) == 17, "stage counts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N + 200) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
