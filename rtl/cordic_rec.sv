// cordic_rec: recursive (iterative) reconfigurable CORDIC.
//
// One rccu_var, whose shifts are barrel shifters, is used NSTAGE =
// n_stage(BSHIFT) times in a row (14 for basic-shift 2, 17 for 3); mrsg, driven by the iteration counter, gives each iteration's shift
// index, angle and direction. Preprocessing and postprocessing are the same
// as in the pipelined design (cordic_pre, cordic_post), so both give the same
// results for the same inputs, to within rounding. A recursive structure
// around one RCCU follows the source architecture; the counter-driven control
// and the handshake are this design's choices.
//
// Interface: a valid/ready input handshake. When in_valid and in_ready are
// both high at a clock edge the operands are taken and in_ready drops. NSTAGE
// edges later the result is in x_o, y_o, z_o, sat and out_valid is high for
// one clock; in_ready is high again from the next cycle on. Results stay in
// their registers until the next one replaces them.
module cordic_rec
  import cordic_pkg::*;
#(
  parameter int BSHIFT = BASIC_SHIFT   // 2 (default) or 3
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  traj_e traj,
  input  mode_e mode,
  input  io_t   x,
  input  io_t   y,
  input  io_t   z,
  output logic  out_valid,
  output io_t   x_o,
  output io_t   y_o,
  output io_t   z_o,
  output logic  sat
);
  localparam int NST = n_stage(BSHIFT);
  localparam int IW     = $clog2(NST);

  stage_t        pre_st, st, nxt;
  logic          busy;
  logic [IW-1:0] cnt;
  logic [SW-1:0] shift;
  word_t         alpha, xn, yn, zn;
  logic          d;
  io_t           px, py, pz;
  logic          psat;

  cordic_pre u_pre (
    .valid(in_valid), .traj(traj), .mode(mode), .x(x), .y(y), .z(z), .st(pre_st)
  );

  mrsg #(.BSHIFT(BSHIFT), .IW(IW)) u_mrsg (
    .idx(cnt), .mode(st.mode), .z(st.z), .y(st.y),
    .shift(shift), .alpha(alpha), .d(d)
  );

  rccu_var u_rccu (
    .traj(st.traj), .d(d), .shift(shift), .x(st.x), .y(st.y), .x_o(xn), .y_o(yn)
  );

  recfg_addsub #(.WIDTH(WI)) u_z (.a(st.z), .b(alpha), .sub(d), .s(zn));

  always_comb begin
    nxt   = st;
    nxt.x = xn;
    nxt.y = yn;
    nxt.z = zn;
  end

  cordic_post u_post (.st(nxt), .x(px), .y(py), .z(pz), .sat(psat));

  assign in_ready = ~busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      cnt       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (!busy) begin
        if (in_valid) begin
          busy <= 1'b1;
          cnt  <= '0;
        end
      end else begin
        if (int'(cnt) == NST - 1) begin
          busy      <= 1'b0;
          out_valid <= 1'b1;
        end
        cnt <= cnt + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!busy && in_valid) st <= pre_st;
    else if (busy)         st <= nxt;
    if (busy && int'(cnt) == NST - 1) begin
      x_o <= px;
      y_o <= py;
      z_o <= pz;
      sat <= psat;
    end
  end
endmodule
