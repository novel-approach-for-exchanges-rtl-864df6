// tb_mrsg: the micro-rotation sequence generator. For every index the shift
// must follow 2, 2, 2, 3, 4, ..., 13 (written out here, not computed from the
// package), the angle must be 2^-shift, and the direction must follow the sign
// of z in rotation mode and of y in vectoring mode. Also checks that the
// angles of the whole sequence sum to more than pi/4.
module tb_mrsg;
  import cordic_pkg::*;
  import cordic_ref_pkg::*;

  localparam int IW = $clog2(NSTAGE);
  localparam int EXP_SHIFT[14] = '{2, 2, 2, 3, 4, 5, 6, 7, 8, 9, 10, 11, 12, 13};

  logic [IW-1:0] idx;
  mode_e         mode;
  word_t         z, y, alpha;
  logic [SW-1:0] shift;
  logic          d;
  int checks = 0, failures = 0;

  mrsg #(.IW(IW)) dut (.idx(idx), .mode(mode), .z(z), .y(y), .shift(shift), .alpha(alpha), .d(d));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    real sum = 0.0;
    chk(NSTAGE == 14, "sequence length");
    for (int i = 0; i < NSTAGE; i++) begin
      idx = IW'(i);
      for (int k = 0; k < 8; k++) begin
        mode = mode_e'(k[0]);
        z = r2w(rnd(-1.0, 1.0));
        y = r2w(rnd(-1.0, 1.0));
        #1;
        chk(int'(shift) == EXP_SHIFT[i], $sformatf("shift idx %0d: %0d", i, shift));
        chk(w2r(alpha) == 1.0 / real'(1 << EXP_SHIFT[i]), $sformatf("alpha idx %0d", i));
        chk(d == ((mode == ROT) ? (w2r(z) >= 0.0) : (w2r(y) < 0.0)), "direction");
      end
      sum += w2r(alpha);
    end
    chk(sum > PI / 4.0, "sequence covers pi/4");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
