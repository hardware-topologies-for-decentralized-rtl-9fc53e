// dn_vdiv - initial estimate unit: x_c = D_c^-1 (H_c^H y_c).
//
// Divides each of the U complex matched-filter outputs m[u] by the real
// diagonal entry d[u] of the approximate local Hessian D_c (the squared norm
// of column u of H_c). Because D_c is diagonal, the inverse reduces to 2U
// independent real divisions, done by 2U dn_div dividers in parallel (one
// for each real and imaginary part). All start together on start; done
// pulses when they finish, W + FRAC + 1 cycles later, and x holds the
// quotients until the next start. The same unit divides the aggregated
// gradient by D in the apex update. Parallel dividers follow the published design;
// the divider itself is this design's choice.
module dn_vdiv
  import dn_pkg::*;
#(
  parameter int U = U_DEF
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  cplx_t [U-1:0] m,
  input  word_t [U-1:0] d,
  output logic          done,
  output cplx_t [U-1:0] x
);
  logic [U-1:0] done_re, done_im;

  for (genvar u = 0; u < U; u++) begin : g_user
    dn_div u_re (.clk, .rst_n, .start, .num(m[u].re), .den(d[u]),
                 .done(done_re[u]), .q(x[u].re));
    dn_div u_im (.clk, .rst_n, .start, .num(m[u].im), .den(d[u]),
                 .done(done_im[u]), .q(x[u].im));
  end

  // All dividers take the same number of cycles and finish together.
  assign done = &{done_re, done_im};
endmodule
