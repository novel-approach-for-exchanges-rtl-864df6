// tb_rccu_var: the run-time-shift RCCU of the recursive design, for every
// shift index of the micro-rotation sequence, both trajectories and both
// directions, against the exact rotation within 4 internal LSBs.
module tb_rccu_var;
  import cordic_pkg::*;
  import cordic_ref_pkg::*;

  localparam real TOL = 4.0 / real'(1 << FI);

  traj_e         traj;
  logic          d;
  logic [SW-1:0] shift;
  word_t         x, y, xo, yo;
  int checks = 0, failures = 0;

  rccu_var dut (.traj(traj), .d(d), .shift(shift), .x(x), .y(y), .x_o(xo), .y_o(yo));

  initial begin
    real ex, ey, ang;
    for (int n = 0; n < 4000; n++) begin
      traj  = traj_e'($urandom_range(0, 1));
      d     = 1'($urandom);
      shift = SW'($urandom_range(BASIC_SHIFT, LAST_SHIFT));
      x     = r2w(rnd(-2.0, 2.0));
      y     = r2w(rnd(-2.0, 2.0));
      #1;
      ang = (d ? 1.0 : -1.0) / real'(1 << shift);
      rot_ref(traj, w2r(x), w2r(y), ang, ex, ey);
      checks += 2;
      if (fabs(w2r(xo) - ex) > TOL || fabs(w2r(yo) - ey) > TOL) begin
        failures++;
        if (failures < 10)
          $display("FAIL s=%0d t=%s d=%0b got=(%f,%f) exp=(%f,%f)", shift, traj.name(), d,
                   w2r(xo), w2r(yo), ex, ey);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
