// mrsg: micro-rotation sequence generator.
//
// For micro-rotation number idx it gives the shift index s (the basic-shift
// BSHIFT repeated 2^BSHIFT - 1 times, then every larger index once, see cordic_pkg), the exact
// angle 2^-s of that micro-rotation in the internal angle format, and its
// direction d (1: turn by +2^-s, 0: by -2^-s):
//   rotation mode  : d = 1 while the remaining angle z is >= 0, so z is driven
//                    to zero and the vector turns by the input angle;
//   vectoring mode : d = 1 while y < 0, so y is driven to zero and z collects
//                    the angle of the vector (x must be positive).
// The sign-driven (always rotate, pick the direction) decomposition is this
// design's choice; it needs no comparison against the angle constants.
// Combinational; the pipelined unit ties idx to a constant per stage, the
// recursive unit drives it from its iteration counter.
module mrsg
  import cordic_pkg::*;
#(
  parameter int BSHIFT = BASIC_SHIFT,
  parameter int IW     = $clog2(n_stage(BSHIFT))
) (
  input  logic [IW-1:0] idx,
  input  mode_e         mode,
  input  word_t         z,
  input  word_t         y,
  output logic [SW-1:0] shift,
  output word_t         alpha,
  output logic          d
);
  always_comb begin
    if (int'(idx) < n_basic(BSHIFT)) shift = SW'(BSHIFT);
    else                             shift = SW'(int'(idx) - n_basic(BSHIFT) + BSHIFT + 1);
    alpha = word_t'(longint'(1) << FI) >>> shift;
    d     = (mode == ROT) ? ~z[WI-1] : y[WI-1];
  end
endmodule
