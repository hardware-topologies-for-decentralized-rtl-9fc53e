// dn_newton_update - Newton step of the apex cluster (eq. 10):
//   x(t) = x(t-1) - D^-1 q
// where q is the gradient aggregated over all clusters and D the aggregated
// diagonal Hessian approximation, both held by the apex cluster.
//
// The division is done by one dn_vdiv (2U real dividers, one per user and
// component, all in parallel); the subtraction and saturation to 16 bits
// happen as the quotients are taken. A start pulse samples nothing: q, d and
// x_old must stay stable until done, which pulses W + FRAC + 2 cycles after
// start; x_new holds until the next start. Parallel per-user division
// follows the published design; the rest of the timing is this design's choice.
module dn_newton_update
  import dn_pkg::*;
#(
  parameter int U = U_DEF
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  cplx_t [U-1:0] x_old,
  input  cplx_t [U-1:0] q,
  input  word_t [U-1:0] d,
  output logic          done,
  output cplx_t [U-1:0] x_new
);
  cplx_t [U-1:0] step;
  logic          div_done;

  dn_vdiv #(.U(U)) u_div (.clk, .rst_n, .start, .m(q), .d, .done(div_done), .x(step));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done  <= 1'b0;
      x_new <= '0;
    end else begin
      done <= div_done;
      if (div_done)
        for (int u = 0; u < U; u++) begin
          x_new[u].re <= sat(acc_t'(x_old[u].re) - acc_t'(step[u].re));
          x_new[u].im <= sat(acc_t'(x_old[u].im) - acc_t'(step[u].im));
        end
    end
  end
endmodule
