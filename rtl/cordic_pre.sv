// cordic_pre: input side shared by the pipelined and the recursive CORDIC.
//
// Widens the W-bit inputs to the internal format and runs the preprocessing
// of the selected mode: pre_rot in rotation mode (angle z folded into
// [0, pi/4]), pre_vec in vectoring mode (vector folded into the first octant,
// angle accumulator started at zero; the z input is not used). The result is
// the record that enters the micro-rotation unit. Combinational.
module cordic_pre
  import cordic_pkg::*;
(
  input  logic   valid,
  input  traj_e  traj,
  input  mode_e  mode,
  input  io_t    x,
  input  io_t    y,
  input  io_t    z,
  output stage_t st
);
  word_t    ry, rz, vx, vy;
  rot_oct_t roct;
  vec_oct_t voct;

  pre_rot u_pre_rot (
    .traj(traj), .y(from_io(y)), .z(from_io(z)),
    .y_o(ry), .z_o(rz), .oct(roct)
  );

  pre_vec u_pre_vec (
    .traj(traj), .x(from_io(x)), .y(from_io(y)),
    .x_o(vx), .y_o(vy), .oct(voct)
  );

  always_comb begin
    st.valid = valid;
    st.traj  = traj;
    st.mode  = mode;
    if (mode == ROT) begin
      st.roct = roct;
      st.voct = '0;
      st.x    = from_io(x);
      st.y    = ry;
      st.z    = rz;
    end else begin
      st.roct = '0;
      st.voct = voct;
      st.x    = vx;
      st.y    = vy;
      st.z    = '0;
    end
  end
endmodule
