// tb_pre_vec: vectoring preprocessing. On the circular trajectory the output
// must satisfy 0 <= y <= x, hold the absolute values of the inputs (swapped
// when |y| > |x|) and record the input signs and the swap. On the hyperbolic
// trajectory the vector must pass unchanged.
module tb_pre_vec;
  import cordic_pkg::*;
  import cordic_ref_pkg::*;

  traj_e    traj;
  word_t    x, y, xo, yo;
  vec_oct_t oct;
  int checks = 0, failures = 0;

  pre_vec dut (.traj(traj), .x(x), .y(y), .x_o(xo), .y_o(yo), .oct(oct));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    real ax, ay;
    for (int n = 0; n < 3000; n++) begin
      traj = traj_e'(n % 5 == 0);
      x = r2w(rnd(-3.0, 3.0));
      y = r2w(rnd(-3.0, 3.0));
      #1;
      if (traj == HYP) begin
        chk(xo == x && yo == y && oct == '0, "hyperbolic pass-through");
      end else begin
        ax = fabs(w2r(x));
        ay = fabs(w2r(y));
        chk(w2r(yo) >= 0.0 && w2r(yo) <= w2r(xo), "not in first octant");
        chk(oct.negx == (w2r(x) < 0.0) && oct.negy == (w2r(y) < 0.0), "sign record");
        chk(oct.swap == (ay > ax), "swap record");
        chk(w2r(xo) == (ay > ax ? ay : ax) && w2r(yo) == (ay > ax ? ax : ay), "values");
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
