// tb_cordic_functions: the elementary functions a reconfigurable CORDIC is
// used for, computed through the pipelined engine of reconfig_cordic at its
// default parameters and compared with the simulator's real math:
//   sin, cos    circular rotation of (1, 0) by a          a in [-pi, pi)
//   atan2, |v|  circular vectoring of (x, y)
//   sinh, cosh  hyperbolic rotation of (1, 0) by a        a in [-0.98, 0.98]
//   exp         hyperbolic rotation of (1, 1): x = e^a
//   atanh       hyperbolic vectoring of (1, r)            r in [-0.75, 0.75]
//   ln          2 * atanh((a-1)/(a+1)): vectoring of (a+1, a-1), a in [0.15, 2.9]
//   sqrt        vectoring of (a+1/4, a-1/4): x = sqrt(a), a in [0.04, 1.75]
// Every function is requested back to back in one stream; the test fails a
// function that was never computed.
module tb_cordic_functions;
  import cordic_pkg::*;
  import cordic_ref_pkg::*;

  localparam int  N_EACH = 60;
  localparam int  N_FUNC = 7;
  localparam real LSB    = 1.0 / real'(1 << F);

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  p_in_valid = 1'b0;
  traj_e p_traj = CIRC;
  mode_e p_mode = ROT;
  io_t   p_x = '0, p_y = '0, p_z = '0;
  logic  p_out_valid, p_sat;
  traj_e p_out_traj;
  mode_e p_out_mode;
  io_t   p_x_o, p_y_o, p_z_o;
  logic  r_in_valid = 1'b0, r_in_ready, r_out_valid, r_sat;
  traj_e r_traj = CIRC;
  mode_e r_mode = ROT;
  io_t   r_x = '0, r_y = '0, r_z = '0, r_x_o, r_y_o, r_z_o;

  reconfig_cordic dut (.*);

  always #5 clk = ~clk;

  typedef struct {
    int  f;       // function number
    real a;       // argument (quantised as the design sees it)
    real b;       // second argument (atan2)
  } req_t;
  req_t q[$];
  int checks = 0, failures = 0, done = 0;
  int n_func[N_FUNC];

  function automatic void chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endfunction

  initial begin
    req_t r;
    real  a, b;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < N_EACH * N_FUNC; n++) begin
      @(negedge clk);
      r.f = n % N_FUNC;
      p_in_valid = 1'b1;
      p_z = '0;
      case (r.f)
        0: begin a = rnd(-PI, PI - 0.001); p_traj = CIRC; p_mode = ROT;
                 p_x = r2io(1.0); p_y = '0; p_z = r2io(a); r.a = io2r(p_z); end
        1: begin a = rnd(-2.5, 2.5); b = rnd(-2.5, 2.5); p_traj = CIRC; p_mode = VEC;
                 p_x = r2io(a); p_y = r2io(b); r.a = io2r(p_x); r.b = io2r(p_y); end
        2: begin a = rnd(-0.98, 0.98); p_traj = HYP; p_mode = ROT;
                 p_x = r2io(1.0); p_y = '0; p_z = r2io(a); r.a = io2r(p_z); end
        3: begin a = rnd(-0.98, 0.98); p_traj = HYP; p_mode = ROT;
                 p_x = r2io(1.0); p_y = r2io(1.0); p_z = r2io(a); r.a = io2r(p_z); end
        4: begin a = rnd(-0.75, 0.75); p_traj = HYP; p_mode = VEC;
                 p_x = r2io(1.0); p_y = r2io(a); r.a = io2r(p_y); end
        5: begin a = io2r(r2io(rnd(0.15, 2.9))); p_traj = HYP; p_mode = VEC;
                 p_x = r2io(a + 1.0); p_y = r2io(a - 1.0); r.a = a; end
        default: begin a = io2r(r2io(rnd(0.04, 1.75))); p_traj = HYP; p_mode = VEC;
                 p_x = r2io(a + 0.25); p_y = r2io(a - 0.25); r.a = a; end
      endcase
      q.push_back(r);
    end
    @(negedge clk);
    p_in_valid = 1'b0;
  end

  always @(posedge clk) begin
    if (rst_n && p_out_valid) begin
      req_t r;
      real  xo, yo, zo;
      r  = q.pop_front();
      xo = io2r(p_x_o);
      yo = io2r(p_y_o);
      zo = io2r(p_z_o);
      case (r.f)
        0: chk(fabs(xo - $cos(r.a)) <= 4 * LSB && fabs(yo - $sin(r.a)) <= 4 * LSB,
               $sformatf("cos/sin(%f) = %f %f", r.a, xo, yo));
        1: chk(fabs(xo - $sqrt(r.a * r.a + r.b * r.b)) <= 6 * LSB &&
               fabs(ang_diff(zo, $atan2(r.b, r.a))) <= 4 * LSB,
               $sformatf("atan2(%f, %f) = %f, |v| = %f", r.b, r.a, zo, xo));
        2: chk(fabs(xo - $cosh(r.a)) <= 4 * LSB && fabs(yo - $sinh(r.a)) <= 4 * LSB,
               $sformatf("cosh/sinh(%f) = %f %f", r.a, xo, yo));
        3: chk(fabs(xo - $exp(r.a)) <= 6 * LSB && fabs(yo - $exp(r.a)) <= 6 * LSB,
               $sformatf("exp(%f) = %f", r.a, xo));
        4: chk(fabs(zo - $atanh(r.a)) <= 4 * LSB, $sformatf("atanh(%f) = %f", r.a, zo));
        5: chk(fabs(2.0 * zo - $ln(r.a)) <= 8 * LSB, $sformatf("ln(%f) = %f", r.a, 2.0 * zo));
        default: chk(fabs(xo - $sqrt(r.a)) <= 6 * LSB, $sformatf("sqrt(%f) = %f", r.a, xo));
      endcase
      n_func[r.f]++;
      done++;
    end
  end

  initial begin
    wait (done == N_EACH * N_FUNC);
    foreach (n_func[i]) chk(n_func[i] == N_EACH, $sformatf("function %0d computed %0d times", i, n_func[i]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N_EACH * N_FUNC + 100) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
