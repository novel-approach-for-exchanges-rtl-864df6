// tb_rccu: micro-rotation units with hardwired shift indices 2 (basic-shift),
// 4 and 9. Random vectors are turned by +-2^-s on both trajectories and
// compared with the exact rotation (cos/sin or cosh/sinh from real math),
// within 4 internal LSBs.
module tb_rccu;
  import cordic_pkg::*;
  import cordic_ref_pkg::*;

  localparam int NS = 3;
  localparam int SH[NS] = '{2, 4, 9};
  localparam real TOL = 4.0 / real'(1 << FI);

  traj_e traj;
  logic  d;
  word_t x, y;
  word_t xo[NS], yo[NS];
  int checks = 0, failures = 0;

  for (genvar i = 0; i < NS; i++) begin : g_dut
    rccu #(.SHIFT(SH[i])) dut (.traj(traj), .d(d), .x(x), .y(y), .x_o(xo[i]), .y_o(yo[i]));
  end

  initial begin
    real rx, ry, ex, ey, ang;
    for (int n = 0; n < 3000; n++) begin
      traj = traj_e'($urandom_range(0, 1));
      d    = 1'($urandom);
      rx   = rnd(-2.0, 2.0);
      ry   = rnd(-2.0, 2.0);
      x    = r2w(rx);
      y    = r2w(ry);
      #1;
      for (int i = 0; i < NS; i++) begin
        ang = (d ? 1.0 : -1.0) / real'(1 << SH[i]);
        rot_ref(traj, w2r(x), w2r(y), ang, ex, ey);
        checks += 2;
        if (fabs(w2r(xo[i]) - ex) > TOL || fabs(w2r(yo[i]) - ey) > TOL) begin
          failures++;
          if (failures < 10)
            $display("FAIL s=%0d t=%s d=%0b in=(%f,%f) got=(%f,%f) exp=(%f,%f)", SH[i],
                     traj.name(), d, w2r(x), w2r(y), w2r(xo[i]), w2r(yo[i]), ex, ey);
        end
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
