// cordic_pkg: shared types, number formats and constant functions of the
// reconfigurable CORDIC.
//
// Number formats. Inputs and outputs (x, y and the angle z) are signed W-bit
// words with F fraction bits (default Q2.13: 16 bits, range [-4, 4)). Inside,
// every word is widened to WI bits with G guard fraction bits and two more
// integer bits, so FI = F + G fraction bits.
//
// Micro-rotation sequence. Every micro-rotation turns the vector by exactly
// 2^-s (radians for the circular trajectory, hyperbolic angle for the
// hyperbolic one), where s is the shift index. The smallest index is the
// basic-shift (2 by default, as in the pipelined unit described for the
// design; the modules take it as the parameter BSHIFT, 2 or 3). It is used
// N_BASIC = 2^BASIC_SHIFT - 1 times, then each index from
// BASIC_SHIFT+1 up to LAST_SHIFT once; the angles then sum to almost 1.0, which
// covers [0, pi/4] with room to spare and gives a hyperbolic range of about
// +-1. The repeat count and the last index are this design's choices.
//
// Taylor coefficients. An RCCU multiplies by cos/sin (or cosh/sinh) of 2^-s
// written as the Taylor series sum (2^-s)^k / k!, k = 0..K_TERMS. Circular and
// hyperbolic series have the same terms and differ only in the sign of the
// terms with floor(k/2) odd, which is why one add/subtract control bit per
// term reconfigures the unit.
package cordic_pkg;

  parameter int W            = 16;  // I/O word width
  parameter int F            = 13;  // I/O fraction bits
  parameter int G            = 4;   // guard fraction bits inside
  parameter int WI           = W + G + 2;
  parameter int FI           = F + G;
  parameter int BASIC_SHIFT  = 2;   // default basic-shift
  parameter int N_BASIC      = (1 << BASIC_SHIFT) - 1;
  parameter int LAST_SHIFT   = F;   // last micro-rotation turns by one I/O LSB
  parameter int NSTAGE       = N_BASIC + LAST_SHIFT - BASIC_SHIFT;
  parameter int K_TERMS      = 6;   // highest Taylor term kept
  parameter int SW           = 5;   // width of a shift index

  typedef logic signed [WI-1:0] word_t;   // internal word
  typedef logic signed [W-1:0]  io_t;     // I/O word

  typedef enum logic {CIRC = 1'b0, HYP = 1'b1} traj_e;   // trajectory bit T
  typedef enum logic {ROT  = 1'b0, VEC = 1'b1} mode_e;   // operating mode

  // Octant record of circular rotation: the result is turned by quad*pi/2
  // after the core; refl marks a core angle taken as pi/2 - t.
  typedef struct packed {
    logic [1:0] quad;
    logic       refl;
  } rot_oct_t;

  // Octant record of circular vectoring: input signs and the x/y swap.
  typedef struct packed {
    logic negx;
    logic negy;
    logic swap;
  } vec_oct_t;

  // What travels down the micro-rotation pipeline.
  typedef struct packed {
    logic     valid;
    traj_e    traj;
    mode_e    mode;
    rot_oct_t roct;
    vec_oct_t voct;
    word_t    x;
    word_t    y;
    word_t    z;
  } stage_t;

  // Angle constants in the internal format.
  localparam real   PI_R    = 3.14159265358979323846;
  localparam word_t PI_4_I  = word_t'(longint'(PI_R / 4.0 * real'(longint'(1) << FI) + 0.5));
  localparam word_t PI_2_I  = word_t'(longint'(PI_R / 2.0 * real'(longint'(1) << FI) + 0.5));
  localparam word_t PI_I    = word_t'(longint'(PI_R       * real'(longint'(1) << FI) + 0.5));
  localparam word_t PI3_2_I = word_t'(longint'(PI_R * 1.5 * real'(longint'(1) << FI) + 0.5));
  localparam word_t PI2_I   = word_t'(longint'(PI_R * 2.0 * real'(longint'(1) << FI) + 0.5));

  // Number of basic-shift repeats and of micro-rotations for basic-shift bs.
  function automatic int n_basic(input int bs);
    return (1 << bs) - 1;
  endfunction

  function automatic int n_stage(input int bs);
    return n_basic(bs) + LAST_SHIFT - bs;
  endfunction

  // Shift index of micro-rotation number i (0 .. n_stage(bs)-1).
  function automatic int stage_shift(input int i, input int bs);
    return (i < n_basic(bs)) ? bs : bs + i - n_basic(bs) + 1;
  endfunction

  function automatic longint fact(input int k);
    longint f = 1;
    for (int j = 2; j <= k; j++) f = f * j;
    return f;
  endfunction

  // round(2^(FI - k*s) / k!): the k-th Taylor term of 2^-s in the internal
  // format; zero once it drops below half an internal LSB.
  function automatic longint taylor_coef(input int k, input int s);
    longint num;
    if (FI - k * s < 0) return 0;
    num = longint'(1) << (FI - k * s);
    return (num + fact(k) / 2) / fact(k);
  endfunction

  // round(2^FI / k!), the shift-free part of a Taylor term (recursive RCCU).
  function automatic longint inv_fact(input int k);
    return ((longint'(1) << FI) + fact(k) / 2) / fact(k);
  endfunction

  // Sign of Taylor term k on the circular trajectory: negative iff floor(k/2)
  // is odd. On the hyperbolic trajectory every term is positive.
  function automatic logic term_neg_circ(input int k);
    return logic'((k / 2) % 2);
  endfunction

  // v * c / 2^FI, rounded to nearest.
  function automatic word_t mul_coef(input word_t v, input longint c);
    longint p;
    p = longint'(v) * c + (longint'(1) <<< (FI - 1));
    return word_t'(p >>> FI);
  endfunction

  // Internal word to I/O word: round away the guard bits and saturate.
  function automatic io_t to_io(input word_t v);
    longint r;
    r = (longint'(v) + (longint'(1) << (G - 1))) >>> G;
    if (r > (longint'(1) << (W - 1)) - 1) return io_t'((longint'(1) << (W - 1)) - 1);
    if (r < -(longint'(1) << (W - 1)))    return io_t'(-(longint'(1) << (W - 1)));
    return io_t'(r);
  endfunction

  // Does the conversion above saturate?
  function automatic logic io_sat(input word_t v);
    longint r;
    r = (longint'(v) + (longint'(1) << (G - 1))) >>> G;
    return (r > (longint'(1) << (W - 1)) - 1) || (r < -(longint'(1) << (W - 1)));
  endfunction

  function automatic word_t from_io(input io_t v);
    return word_t'(v) <<< G;
  endfunction

endpackage
