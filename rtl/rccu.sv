// rccu: reconfigurable circular/hyperbolic CORDIC micro-rotation unit with a
// hardwired shift index, the building block of the pipelined unit.
//
// It turns (x, y) by the angle d * 2^-SHIFT on the trajectory chosen by traj:
//   circular   : x' = C x - d S y,  y' = C y + d S x,  C = cos, S = sin
//   hyperbolic : x' = C x + d S y,  y' = C y + d S x,  C = cosh, S = sinh
// C and S of 2^-SHIFT are the Taylor series up to term K_TERMS. Each term is
// v * (2^-SHIFT)^k / k! with a constant that depends only on SHIFT, so every
// shift is hardwired and no barrel shifter is needed. The two trajectories use
// the same terms; a reconfigurable add/subtract per term and one for the cross
// term of x' give the sign change, as the design prescribes. Because C and S
// are (to the series' accuracy) a true rotation, the unit has no CORDIC scale
// factor. Taking the series instead of a shift-only micro-rotation is this
// design's reading of how the RCCU is built.
//
// Interface: d = 1 turns by +2^-SHIFT, d = 0 by -2^-SHIFT. Combinational.
module rccu
  import cordic_pkg::*;
#(
  parameter int SHIFT = BASIC_SHIFT
) (
  input  traj_e traj,
  input  logic  d,
  input  word_t x,
  input  word_t y,
  output word_t x_o,
  output word_t y_o
);
  logic is_circ;
  assign is_circ = (traj == CIRC);

  // Partial sums: c* accumulate the even terms (cos/cosh), s* the odd ones.
  word_t cx [K_TERMS+1];
  word_t cy [K_TERMS+1];
  word_t sx [K_TERMS+1];
  word_t sy [K_TERMS+1];

  assign cx[0] = x;
  assign cy[0] = y;
  assign sx[0] = '0;
  assign sy[0] = '0;

  for (genvar k = 1; k <= K_TERMS; k++) begin : g_term
    localparam longint COEF = taylor_coef(k, SHIFT);
    localparam logic   NEG  = term_neg_circ(k);
    word_t tx, ty;
    logic  sub;
    assign tx  = mul_coef(x, COEF);
    assign ty  = mul_coef(y, COEF);
    assign sub = is_circ & NEG;
    if (k % 2 == 0) begin : g_even
      recfg_addsub #(.WIDTH(WI)) u_cx (.a(cx[k-1]), .b(tx), .sub(sub), .s(cx[k]));
      recfg_addsub #(.WIDTH(WI)) u_cy (.a(cy[k-1]), .b(ty), .sub(sub), .s(cy[k]));
      assign sx[k] = sx[k-1];
      assign sy[k] = sy[k-1];
    end else begin : g_odd
      recfg_addsub #(.WIDTH(WI)) u_sx (.a(sx[k-1]), .b(tx), .sub(sub), .s(sx[k]));
      recfg_addsub #(.WIDTH(WI)) u_sy (.a(sy[k-1]), .b(ty), .sub(sub), .s(sy[k]));
      assign cx[k] = cx[k-1];
      assign cy[k] = cy[k-1];
    end
  end

  // x' = Cx -/+ S y : subtract when (circular, d=1) or (hyperbolic, d=0).
  recfg_addsub #(.WIDTH(WI)) u_x (.a(cx[K_TERMS]), .b(sy[K_TERMS]), .sub(is_circ ^ ~d), .s(x_o));
  // y' = Cy + d S x
  recfg_addsub #(.WIDTH(WI)) u_y (.a(cy[K_TERMS]), .b(sx[K_TERMS]), .sub(~d), .s(y_o));
endmodule
