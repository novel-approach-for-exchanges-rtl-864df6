// tb_cordic_rec: the recursive reconfigurable CORDIC through its valid/ready
// handshake, with basic-shift 2 (14 iterations) and basic-shift 3 (17) side by
// side on the same operands. Operations of all four kinds (circular/hyperbolic,
// rotation/vectoring) over the full input ranges (any angle in [-pi, pi) for
// circular rotation, any vector for circular vectoring) are compared with the
// exact reference within 6 output LSBs. Also checked for each engine:
// out_valid comes exactly n_stage(BSHIFT) clocks after acceptance and lasts one
// clock, in_ready stays low while busy, and an in_valid held high until the
// result is out is taken only once.
module tb_cordic_rec;
  import cordic_pkg::*;
  import cordic_ref_pkg::*;

  localparam int  N   = 300;
  localparam int  NB  = 2;
  localparam int  BS[NB] = '{2, 3};
  localparam real TOL = 6.0 / real'(1 << F);

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  in_valid = 1'b0;
  traj_e traj = CIRC;
  mode_e mode = ROT;
  io_t   x = '0, y = '0, z = '0;
  logic  in_ready[NB], out_valid[NB], sat[NB];
  io_t   x_o[NB], y_o[NB], z_o[NB];
  int checks = 0, failures = 0;
  int n_accept[NB], n_out[NB];

  always #5 clk = ~clk;

  for (genvar g = 0; g < NB; g++) begin : g_dut
    cordic_rec #(.BSHIFT(BS[g])) dut (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready[g]),
      .traj(traj), .mode(mode), .x(x), .y(y), .z(z),
      .out_valid(out_valid[g]), .x_o(x_o[g]), .y_o(y_o[g]), .z_o(z_o[g]), .sat(sat[g])
    );

    always @(posedge clk) begin
      if (rst_n && in_valid && in_ready[g]) n_accept[g]++;
      if (rst_n && out_valid[g]) n_out[g]++;
    end
  end

  function automatic void chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endfunction

  initial begin
    real rx, ry, rz, ex, ey, ez;
    int  lat[NB];
    foreach (lat[g]) lat[g] = n_stage(BS[g]);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int n = 0; n < N; n++) begin
      traj = traj_e'(n[1]);
      mode = mode_e'(n[0]);
      case (n % 4)
        0: begin rx = rnd(-1.4, 1.4); ry = rnd(-1.4, 1.4); rz = rnd(-PI, PI - 0.001); end
        1: begin rx = rnd(-2.5, 2.5); ry = rnd(-2.5, 2.5); rz = 0.0; end
        2: begin rx = rnd(-0.7, 0.7); ry = rnd(-0.7, 0.7); rz = rnd(-0.98, 0.98); end
        default: begin rx = rnd(0.5, 2.5); ry = rx * rnd(-0.75, 0.75); rz = 0.0; end
      endcase
      x = r2io(rx); y = r2io(ry); z = r2io(rz);
      if (mode == ROT) begin
        rot_ref(traj, io2r(x), io2r(y), io2r(z), ex, ey);
        ez = 0.0;
      end else begin
        vec_ref(traj, io2r(x), io2r(y), ex, ez);
        ey = 0.0;
      end
      // both engines are idle here, so both take the operands at the next edge
      foreach (in_ready[g]) chk(in_ready[g], "idle engine not ready");
      in_valid = 1'b1;
      @(negedge clk);                        // accepted at the edge in between
      if (n % 2 == 0) in_valid = 1'b0;       // odd operations: keep in_valid held
      // c counts edges since acceptance
      for (int c = 0; c <= lat[NB-1]; c++) begin
        foreach (lat[g]) begin
          if (c < lat[g]) chk(!in_ready[g] && !out_valid[g], $sformatf("bs%0d busy", BS[g]));
          chk(out_valid[g] == (c == lat[g]), $sformatf("bs%0d out_valid at %0d", BS[g], c));
          if (c == lat[g]) begin
            chk(fabs(io2r(x_o[g]) - ex) <= TOL && fabs(io2r(y_o[g]) - ey) <= TOL &&
                fabs((mode == VEC) ? ang_diff(io2r(z_o[g]), ez) : io2r(z_o[g])) <= TOL,
                $sformatf("bs%0d %s %s in (%f,%f,%f) got (%f,%f,%f) exp (%f,%f,%f)", BS[g],
                          traj.name(), mode.name(), io2r(x), io2r(y), io2r(z),
                          io2r(x_o[g]), io2r(y_o[g]), io2r(z_o[g]), ex, ey, ez));
            chk(!sat[g], "unexpected saturation");
          end
        end
        // release a held in_valid before the faster engine is free again
        if (c == lat[0]) in_valid = 1'b0;
        @(negedge clk);
      end
      foreach (lat[g]) chk(!out_valid[g], "out_valid longer than one clock");
    end
    foreach (n_accept[g])
      chk(n_accept[g] == N && n_out[g] == N,
          $sformatf("bs%0d accepted %0d, finished %0d", BS[g], n_accept[g], n_out[g]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N * (n_stage(3) + 4) + 100) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
