// cordic_stage: one stage of the pipelined unit: one micro-rotation with the
// hardwired shift index of stage IDX, followed by the pipeline register.
//
// mrsg (with its index tied to IDX) gives the direction from the sign of z
// (rotation) or y (vectoring); rccu turns (x, y) by +-2^-s on the trajectory
// carried in the record; a reconfigurable add/subtract updates z by -+2^-s.
// Trajectory, mode and octant records travel along unchanged. One clock of
// latency, a new record every clock; rst_n clears the register.
module cordic_stage
  import cordic_pkg::*;
#(
  parameter int IDX    = 0,
  parameter int BSHIFT = BASIC_SHIFT
) (
  input  logic   clk,
  input  logic   rst_n,
  input  stage_t st_i,
  output stage_t st_o
);
  localparam int SHIFT = stage_shift(IDX, BSHIFT);
  localparam int IW    = $clog2(n_stage(BSHIFT));

  logic [SW-1:0] shift_unused;
  word_t         alpha, xn, yn, zn;
  logic          d;
  stage_t        nxt;

  mrsg #(.BSHIFT(BSHIFT), .IW(IW)) u_mrsg (
    .idx(IW'(IDX)), .mode(st_i.mode), .z(st_i.z), .y(st_i.y),
    .shift(shift_unused), .alpha(alpha), .d(d)
  );

  rccu #(.SHIFT(SHIFT)) u_rccu (
    .traj(st_i.traj), .d(d), .x(st_i.x), .y(st_i.y), .x_o(xn), .y_o(yn)
  );

  recfg_addsub #(.WIDTH(WI)) u_z (.a(st_i.z), .b(alpha), .sub(d), .s(zn));

  always_comb begin
    nxt   = st_i;
    nxt.x = xn;
    nxt.y = yn;
    nxt.z = zn;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) st_o <= '0;
    else        st_o <= nxt;
  end
endmodule
