// pre_vec: preprocessing of the vectoring mode (range-of-convergence
// extension of the circular trajectory).
//
// Circular vectoring converges only for vectors whose angle the micro-rotation
// sequence covers. This unit folds any (x, y) into the first octant,
// 0 <= y <= x, by taking absolute values and swapping x and y when |y| > |x|;
// the signs and the swap are recorded for post_vec. The magnitude is not
// changed, so the core's x result is the input's magnitude directly. On the
// hyperbolic trajectory the vector passes through (x must then be positive and
// |y/x| < tanh(1), about 0.76). The folding scheme is this design's choice.
// Combinational.
module pre_vec
  import cordic_pkg::*;
(
  input  traj_e    traj,
  input  word_t    x,
  input  word_t    y,
  output word_t    x_o,
  output word_t    y_o,
  output vec_oct_t oct
);
  word_t ax, ay;

  always_comb begin
    ax  = x[WI-1] ? -x : x;
    ay  = y[WI-1] ? -y : y;
    if (traj == HYP) begin
      x_o = x;
      y_o = y;
      oct = '0;
    end else begin
      oct = '{negx: x[WI-1], negy: y[WI-1], swap: (ay > ax)};
      x_o = (ay > ax) ? ay : ax;
      y_o = (ay > ax) ? ax : ay;
    end
  end
endmodule
