// rccu_var: RCCU of the recursive design, with the shift index given at run
// time.
//
// Same micro-rotation as rccu (turn (x, y) by d * 2^-shift, circular or
// hyperbolic by traj, Taylor series of cos/sin or cosh/sinh up to K_TERMS), but
// since one unit serves every iteration the shift index is an input and each
// Taylor term is v * round(2^FI / k!) followed by a barrel shift right by
// FI + k*shift (rounded to nearest). Terms k = 1 and 2 have constants that are
// powers of two, so they reduce to plain shifts. Trajectory reconfiguration is
// the same per-term add/subtract as in rccu. Combinational.
module rccu_var
  import cordic_pkg::*;
(
  input  traj_e          traj,
  input  logic           d,
  input  logic [SW-1:0]  shift,
  input  word_t          x,
  input  word_t          y,
  output word_t          x_o,
  output word_t          y_o
);
  logic is_circ;
  assign is_circ = (traj == CIRC);

  // One Taylor term: v / k! / 2^(k*shift), rounded; zero when it cannot reach
  // an LSB.
  function automatic word_t term(input word_t v, input int k, input logic [SW-1:0] s);
    int     sh;
    longint p;
    sh = k * int'(s);
    if (sh >= WI) return '0;
    p = longint'(v) * inv_fact(k);
    p = (p + (longint'(1) <<< (FI + sh - 1))) >>> (FI + sh);
    return word_t'(p);
  endfunction

  word_t cx [K_TERMS+1];
  word_t cy [K_TERMS+1];
  word_t sx [K_TERMS+1];
  word_t sy [K_TERMS+1];

  assign cx[0] = x;
  assign cy[0] = y;
  assign sx[0] = '0;
  assign sy[0] = '0;

  for (genvar k = 1; k <= K_TERMS; k++) begin : g_term
    localparam logic NEG = term_neg_circ(k);
    word_t tx, ty;
    logic  sub;
    assign tx  = term(x, k, shift);
    assign ty  = term(y, k, shift);
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

  recfg_addsub #(.WIDTH(WI)) u_x (.a(cx[K_TERMS]), .b(sy[K_TERMS]), .sub(is_circ ^ ~d), .s(x_o));
  recfg_addsub #(.WIDTH(WI)) u_y (.a(cy[K_TERMS]), .b(sx[K_TERMS]), .sub(~d), .s(y_o));
endmodule
