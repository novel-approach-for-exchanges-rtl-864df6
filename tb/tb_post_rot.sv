// tb_post_rot: rotation postprocessing. A random vector and octant record go
// in; the output must be the vector with y negated when refl is set, then
// turned by (quad + refl) quarter turns, worked out here with real cos/sin.
module tb_post_rot;
  import cordic_pkg::*;
  import cordic_ref_pkg::*;

  word_t    x, y, xo, yo;
  rot_oct_t oct;
  int checks = 0, failures = 0;

  post_rot dut (.x(x), .y(y), .oct(oct), .x_o(xo), .y_o(yo));

  initial begin
    real ex, ey, yy;
    int  qq;
    for (int n = 0; n < 2000; n++) begin
      x   = r2w(rnd(-2.0, 2.0));
      y   = r2w(rnd(-2.0, 2.0));
      oct = rot_oct_t'($urandom_range(0, 7));
      #1;
      yy = oct.refl ? -w2r(y) : w2r(y);
      qq = int'(oct.quad) + int'(oct.refl);
      rot_ref(CIRC, w2r(x), yy, real'(qq) * PI / 2.0, ex, ey);
      checks++;
      if (fabs(w2r(xo) - ex) > 1e-6 || fabs(w2r(yo) - ey) > 1e-6) begin
        failures++;
        if (failures < 10)
          $display("FAIL oct=%p in=(%f,%f) got=(%f,%f) exp=(%f,%f)", oct, w2r(x), w2r(y),
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
