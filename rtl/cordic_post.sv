// cordic_post: output side shared by the pipelined and the recursive CORDIC.
//
// Runs the postprocessing of the mode that travelled with the data: post_rot
// (quarter turns and reflection of the rotated vector) in rotation mode,
// post_vec (angle unfolded to [-pi, pi]) in vectoring mode. Then rounds the
// guard bits away and saturates to W bits; sat reports that a result was
// clipped. Combinational.
//   rotation  : x, y = input vector turned by z (circular) or by the
//               hyperbolic angle z; z = remaining angle (about 0).
//   vectoring : x = |(x, y)| (circular) or sqrt(x^2 - y^2) (hyperbolic);
//               y = about 0; z = angle, atan2(y, x) or atanh(y / x).
module cordic_post
  import cordic_pkg::*;
(
  input  stage_t st,
  output io_t    x,
  output io_t    y,
  output io_t    z,
  output logic   sat
);
  word_t rx, ry, vz, fx, fy, fz;

  post_rot u_post_rot (.x(st.x), .y(st.y), .oct(st.roct), .x_o(rx), .y_o(ry));
  post_vec u_post_vec (.z(st.z), .oct(st.voct), .z_o(vz));

  always_comb begin
    if (st.mode == ROT) begin
      fx = rx;
      fy = ry;
      fz = st.z;
    end else begin
      fx = st.x;
      fy = st.y;
      fz = vz;
    end
    x   = to_io(fx);
    y   = to_io(fy);
    z   = to_io(fz);
    sat = io_sat(fx) | io_sat(fy) | io_sat(fz);
  end
endmodule
