// dn_pkg - shared types, sizes and fixed-point helpers of the decentralized
// Newton (DN) MIMO uplink detector.
//
// Every complex quantity travels as two 16-bit two's-complement words (real and
// imaginary part), the 32-bit complex type used for the detector's fixed-point
// arithmetic. The binary point position (FRAC fractional bits) is this design's
// choice: Q4.12 leaves room for the Hessian diagonal D summed over all clusters
// when channel entries are scaled to roughly unit column energy.
//
// Arithmetic rules used everywhere: products are kept at full precision,
// sums are accumulated wide, and a result is brought back to 16 bits by an
// arithmetic right shift of FRAC bits (rounding toward minus infinity) followed
// by saturation to the 16-bit range.
//
// Some constants (the default sizes, WORD_MIN, ...) are only used by some of
// the modules that import the package.
package dn_pkg;

  localparam int W    = 16;   // bits per real component
  localparam int FRAC = 12;   // fractional bits of a component (Q4.12)

  // Default system configuration: B = 128 antennas, U = 8 users,
  // C = 4 clusters of B_c = 32 antennas, T = 3 Newton iterations.
  localparam int U_DEF  = 8;
  localparam int BC_DEF = 32;
  localparam int C_DEF  = 4;
  localparam int T_DEF  = 3;

  // Accumulator width for sums of full-precision products.
  localparam int ACCW = 48;

  typedef logic signed [W-1:0]    word_t;
  typedef logic signed [ACCW-1:0] acc_t;

  typedef struct packed {
    word_t re;
    word_t im;
  } cplx_t;

  typedef struct packed {
    acc_t re;
    acc_t im;
  } cacc_t;

  // One beat on an inter-cluster link: one element of p and one element of q.
  typedef struct packed {
    cplx_t p;
    cplx_t q;
  } beat_t;

  localparam int BEAT_W = $bits(beat_t);

  localparam word_t WORD_MAX = word_t'({1'b0, {(W-1){1'b1}}});
  localparam word_t WORD_MIN = word_t'({1'b1, {(W-1){1'b0}}});

  // Saturate a wide signed value to one 16-bit component.
  function automatic word_t sat(input acc_t v);
    if (v > acc_t'(WORD_MAX))      return WORD_MAX;
    else if (v < acc_t'(WORD_MIN)) return WORD_MIN;
    else                           return word_t'(v);
  endfunction

  // Requantize a full-precision (2*FRAC fractional bits) accumulator.
  function automatic word_t requant(input acc_t v);
    return sat(v >>> FRAC);
  endfunction

  function automatic cplx_t cadd_sat(input cplx_t a, input cplx_t b);
    cplx_t r;
    r.re = sat(acc_t'(a.re) + acc_t'(b.re));
    r.im = sat(acc_t'(a.im) + acc_t'(b.im));
    return r;
  endfunction

  // Full-precision complex product a * b, or conj(a) * b when conj_a is set.
  function automatic cacc_t cmul(input cplx_t a, input cplx_t b, input logic conj_a);
    cacc_t r;
    acc_t rr, ii, ri, ir;
    rr = acc_t'(a.re) * acc_t'(b.re);
    ii = acc_t'(a.im) * acc_t'(b.im);
    ri = acc_t'(a.re) * acc_t'(b.im);
    ir = acc_t'(a.im) * acc_t'(b.re);
    if (conj_a) begin
      r.re = rr + ii;
      r.im = ri - ir;
    end else begin
      r.re = rr - ii;
      r.im = ri + ir;
    end
    return r;
  endfunction

endpackage
