// tb_pre_rot: rotation preprocessing. For random angles in [-pi, pi) on the
// circular trajectory the core angle must lie in [0, pi/4] and, with the
// octant record, give back the input angle: quad*pi/2 + phi (refl = 0) or
// quad*pi/2 + pi/2 - phi (refl = 1), modulo 2*pi; y must be negated exactly
// when refl is set. The quadrant and reflection expected are worked out here
// from the real angle. On the hyperbolic trajectory all must pass unchanged.
module tb_pre_rot;
  import cordic_pkg::*;
  import cordic_ref_pkg::*;

  traj_e    traj;
  word_t    y, z, yo, zo;
  rot_oct_t oct;
  int checks = 0, failures = 0;

  pre_rot dut (.traj(traj), .y(y), .z(z), .y_o(yo), .z_o(zo), .oct(oct));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    real th, tp, phi, back, lsb;
    int  q;
    bit  rf;
    lsb = 1.0 / real'(1 << FI);
    for (int n = 0; n < 3000; n++) begin
      traj = traj_e'(n % 5 == 0);
      th = rnd(-PI, PI);
      y  = r2w(rnd(-1.0, 1.0));
      z  = r2w(th);
      #1;
      if (traj == HYP) begin
        chk(yo == y && zo == z && oct == '0, "hyperbolic pass-through");
      end else begin
        tp  = w2r(z) < 0.0 ? w2r(z) + 2.0 * PI : w2r(z);
        q   = int'($floor(tp / (PI / 2.0)));
        if (q > 3) q = 3;
        rf  = (tp - q * PI / 2.0) > PI / 4.0;
        phi = w2r(zo);
        // skip the exact quadrant/octant edges, where rounding may go either way
        if (fabs(tp / (PI / 4.0) - $floor(tp / (PI / 4.0) + 0.5)) > 1e-4) begin
          chk(int'(oct.quad) == q, $sformatf("quad %0d exp %0d at %f", oct.quad, q, th));
          chk(oct.refl == rf, $sformatf("refl at %f", th));
        end
        chk(phi >= -lsb && phi <= PI / 4.0 + lsb, $sformatf("core angle %f out of range", phi));
        back = oct.quad * PI / 2.0 + (oct.refl ? PI / 2.0 - phi : phi);
        chk(fabs(ang_diff(back, w2r(z))) < 4.0 * lsb, $sformatf("angle lost at %f", th));
        chk(yo == (oct.refl ? -y : y), "y handling");
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
