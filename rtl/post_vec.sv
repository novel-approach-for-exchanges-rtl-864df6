// post_vec: postprocessing of the vectoring mode (circular trajectory only).
//
// Turns the first-octant angle a that the core found back into the angle of
// the original vector: a -> pi/2 - a if x and y were swapped, then
// a -> pi - a if x was negative, then a -> -a if y was negative. The result
// lies in [-pi, pi]. With oct = 0 (hyperbolic) the angle passes through.
// Combinational.
module post_vec
  import cordic_pkg::*;
(
  input  word_t    z,
  input  vec_oct_t oct,
  output word_t    z_o
);
  word_t a1, a2;

  always_comb begin
    a1  = oct.swap ? PI_2_I - z : z;
    a2  = oct.negx ? PI_I - a1 : a1;
    z_o = oct.negy ? -a2 : a2;
  end
endmodule
