// pre_rot: preprocessing of the rotation mode.
//
// On the circular trajectory it maps any input angle z in [-4, 4) rad to a core
// angle in [0, pi/4], which the micro-rotation sequence can reach, and records
// how to undo that for post_rot. The angle is first brought into [0, 2*pi) by
// adding 2*pi when it is negative. Then quad = number of pi/2 steps below it
// (three constant comparisons) and t = z - quad*pi/2 in [0, pi/2). For
// t <= pi/4 the core angle is t. Otherwise it is pi/2 - t and refl is set: a
// turn by t equals a turn by pi/2 after a turn by -(pi/2 - t), and a turn by
// a negative angle is done as a turn by the positive one with y negated before
// and after, so y is negated here (x is not touched and is not an input). On the hyperbolic trajectory everything
// passes through untouched (quad = 0, refl = 0).
// The octant decomposition is this design's; the source architecture gives
// the range [0, pi/4] and the swap/complement in post-processing.
// Combinational.
module pre_rot
  import cordic_pkg::*;
(
  input  traj_e    traj,
  input  word_t    y,
  input  word_t    z,
  output word_t    y_o,
  output word_t    z_o,
  output rot_oct_t oct
);
  word_t      zp, t;
  logic [1:0] q;

  always_comb begin
    zp = z[WI-1] ? z + PI2_I : z;
    q  = 2'(int'(zp >= PI_2_I) + int'(zp >= PI_I) + int'(zp >= PI3_2_I));
    unique case (q)
      2'd0:    t = zp;
      2'd1:    t = zp - PI_2_I;
      2'd2:    t = zp - PI_I;
      default: t = zp - PI3_2_I;
    endcase
    if (traj == HYP) begin
      y_o = y;
      z_o = z;
      oct = '0;
    end else if (t > PI_4_I) begin
      y_o = -y;
      z_o = PI_2_I - t;
      oct = '{quad: q, refl: 1'b1};
    end else begin
      y_o = y;
      z_o = t;
      oct = '{quad: q, refl: 1'b0};
    end
  end
endmodule
