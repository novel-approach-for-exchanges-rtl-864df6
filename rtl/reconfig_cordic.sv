// reconfig_cordic: generalized reconfigurable CORDIC, top level.
//
// One circuit computes everything circular and hyperbolic CORDIC compute, in
// rotation mode (turn a vector by an angle: sin/cos, sinh/cosh, exp) and in
// vectoring mode (magnitude and angle of a vector: atan2, sqrt(x^2-y^2),
// atanh, hence ln and sqrt). The trajectory bit T (CIRC = 0, HYP = 1) and the
// mode bit are given with every operand set.
//
// Two engines stand side by side, with their own ports:
//   pipelined (p_*): cordic_pre, an input register, cordic_pipe (NSTAGE RCCU
//     stages with hardwired shifts), cordic_post and an output register.
//     One operand set per clock; p_out_valid follows p_in_valid by NSTAGE + 2
//     clocks (input register, NSTAGE stages, output register).
//   recursive (r_*): cordic_rec, one RCCU with barrel shifters, a valid/ready
//     handshake, NSTAGE clocks per operation.
// NSTAGE = n_stage(BSHIFT) micro-rotations: 14 for basic-shift 2, 17 for 3.
// Formats (cordic_pkg): x, y, z are signed Q2.13 by default. Results of
// rotation: (x, y) turned by z; vectoring: x = magnitude, z = angle. The sat
// output flags a result clipped to the W-bit range. Reset: active-low
// asynchronous rst_n clears the valid flags and the recursive controller.
module reconfig_cordic
  import cordic_pkg::*;
#(
  parameter int BSHIFT = BASIC_SHIFT   // basic-shift: 2 (default) or 3
) (
  input  logic  clk,
  input  logic  rst_n,
  // pipelined engine
  input  logic  p_in_valid,
  input  traj_e p_traj,
  input  mode_e p_mode,
  input  io_t   p_x,
  input  io_t   p_y,
  input  io_t   p_z,
  output logic  p_out_valid,
  output traj_e p_out_traj,
  output mode_e p_out_mode,
  output io_t   p_x_o,
  output io_t   p_y_o,
  output io_t   p_z_o,
  output logic  p_sat,
  // recursive engine
  input  logic  r_in_valid,
  output logic  r_in_ready,
  input  traj_e r_traj,
  input  mode_e r_mode,
  input  io_t   r_x,
  input  io_t   r_y,
  input  io_t   r_z,
  output logic  r_out_valid,
  output io_t   r_x_o,
  output io_t   r_y_o,
  output io_t   r_z_o,
  output logic  r_sat
);
  stage_t pre_st, in_st, out_st;
  io_t    px, py, pz;
  logic   psat;

  cordic_pre u_pre (
    .valid(p_in_valid), .traj(p_traj), .mode(p_mode),
    .x(p_x), .y(p_y), .z(p_z), .st(pre_st)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) in_st <= '0;
    else        in_st <= pre_st;
  end

  cordic_pipe #(.BSHIFT(BSHIFT)) u_pipe (.clk(clk), .rst_n(rst_n), .st_i(in_st), .st_o(out_st));

  cordic_post u_post (.st(out_st), .x(px), .y(py), .z(pz), .sat(psat));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) p_out_valid <= 1'b0;
    else        p_out_valid <= out_st.valid;
  end

  always_ff @(posedge clk) begin
    p_out_traj <= out_st.traj;
    p_out_mode <= out_st.mode;
    p_x_o      <= px;
    p_y_o      <= py;
    p_z_o      <= pz;
    p_sat      <= psat;
  end

  cordic_rec #(.BSHIFT(BSHIFT)) u_rec (
    .clk(clk), .rst_n(rst_n),
    .in_valid(r_in_valid), .in_ready(r_in_ready),
    .traj(r_traj), .mode(r_mode), .x(r_x), .y(r_y), .z(r_z),
    .out_valid(r_out_valid), .x_o(r_x_o), .y_o(r_y_o), .z_o(r_z_o), .sat(r_sat)
  );
endmodule
