// tb_post_vec: vectoring postprocessing. A first-octant angle a and a random
// octant record go in; the output must be the angle of the vector
// (cos a, sin a) after undoing the fold (swap x and y, then negate x and/or
// y as recorded), computed here with atan2.
module tb_post_vec;
  import cordic_pkg::*;
  import cordic_ref_pkg::*;

  word_t    z, zo;
  vec_oct_t oct;
  int checks = 0, failures = 0;

  post_vec dut (.z(z), .oct(oct), .z_o(zo));

  initial begin
    real a, vx, vy, t, e;
    for (int n = 0; n < 2000; n++) begin
      a   = rnd(0.001, PI / 4.0);
      z   = r2w(a);
      oct = vec_oct_t'($urandom_range(0, 7));
      #1;
      vx = $cos(w2r(z));
      vy = $sin(w2r(z));
      if (oct.swap) begin t = vx; vx = vy; vy = t; end
      if (oct.negx) vx = -vx;
      if (oct.negy) vy = -vy;
      e = $atan2(vy, vx);
      checks++;
      if (fabs(ang_diff(w2r(zo), e)) > 3.0 / real'(1 << FI)) begin
        failures++;
        if (failures < 10) $display("FAIL a=%f oct=%p got %f exp %f", a, oct, w2r(zo), e);
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
