// post_rot: postprocessing of the rotation mode (circular trajectory only).
//
// Undoes pre_rot on the rotated vector. With refl set, y is negated (second
// half of a negative-angle turn) and the vector is turned one more quarter.
// Then it is turned by quad quarter turns, which only swaps and complements
// x and y: 1: (-y, x), 2: (-x, -y), 3: (y, -x). For x = 1, y = 0 at the input
// this is the swap/complement of cosine and sine by octant. On the hyperbolic
// trajectory pre_rot leaves quad = refl = 0, so nothing changes.
// Combinational.
module post_rot
  import cordic_pkg::*;
(
  input  word_t    x,
  input  word_t    y,
  input  rot_oct_t oct,
  output word_t    x_o,
  output word_t    y_o
);
  word_t      yr;
  logic [1:0] q;

  always_comb begin
    yr = oct.refl ? -y : y;
    q  = oct.quad + 2'(oct.refl);
    unique case (q)
      2'd0:    begin x_o = x;   y_o = yr;  end
      2'd1:    begin x_o = -yr; y_o = x;   end
      2'd2:    begin x_o = -x;  y_o = -yr; end
      default: begin x_o = yr;  y_o = -x;  end
    endcase
  end
endmodule
