// dn_qam_decoder - 16-QAM hard-decision decoder for the final estimate x(T).
//
// Maps each of the U complex estimates to the 4 bits of the nearest 16-QAM
// point. Per component the constellation levels are -3A, -A, +A, +3A (A =
// LEVEL, in Q4.12); decision thresholds sit at -2A, 0 and +2A, and the two
// bits per component follow the Gray code 00, 01, 11, 10 from the most
// negative level up. bits[u] = {real bits, imaginary bits}. Purely
// combinational. The published design only names this decoder; the level spacing,
// thresholds' tie rule (a value on a threshold goes to the upper level) and
// the Gray labelling are this design's choices.
module dn_qam_decoder
  import dn_pkg::*;
#(
  parameter int    U     = U_DEF,
  parameter word_t LEVEL = word_t'(1 << (FRAC - 2))   // A = 0.25
) (
  input  cplx_t [U-1:0]      x,
  output logic  [U-1:0][3:0] bits
);
  function automatic logic [1:0] slice(input word_t v);
    acc_t th;
    th = acc_t'(LEVEL) * 2;
    if (acc_t'(v) < -th)      return 2'b00;
    else if (v < 0)           return 2'b01;
    else if (acc_t'(v) < th)  return 2'b11;
    else                      return 2'b10;
  endfunction

  always_comb
    for (int u = 0; u < U; u++) bits[u] = {slice(x[u].re), slice(x[u].im)};
endmodule
