// dn_grad - local gradient unit: g = H_c^H H_c x - H_c^H y_c (eq. 5 term).
//
// Forms the cluster's contribution to the first gradient from the stored Gram
// matrix G, the matched-filter output m and an estimate x (the cluster's own
// initial estimate in the first iteration, the broadcast x(t-1) later; that
// choice is made outside, by the multiplexer driven by the iteration count).
// The matrix-vector product is unrolled over the U rows: in cycle j every row
// i adds G[i][j] * x[j] to its accumulator, so the product takes U cycles with
// U complex multipliers. In the last cycle m (scaled to the accumulator's
// binary point) is subtracted, the result is requantized to 16-bit components
// and done pulses: U + 1 cycles from start to done. G, x and m must stay
// stable while the unit runs; g holds until the next start. Row unrolling
// follows the published design; the schedule is this design's choice.
module dn_grad
  import dn_pkg::*;
#(
  parameter int U = U_DEF,
  localparam int JW = (U > 1) ? $clog2(U) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  cplx_t [U-1:0][U-1:0] g_mat,
  input  cplx_t [U-1:0]        x,
  input  cplx_t [U-1:0]        m,
  output logic                 done,
  output cplx_t [U-1:0]        g
);
  cacc_t acc [U];
  logic  busy;
  logic  [JW-1:0] j;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      j    <= '0;
      done <= 1'b0;
      g    <= '0;
      for (int i = 0; i < U; i++) acc[i] <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy <= 1'b1;
        j    <= '0;
        for (int i = 0; i < U; i++) acc[i] <= '0;
      end else if (busy) begin
        for (int i = 0; i < U; i++) begin
          cacc_t pr;
          acc_t  sre, sim;
          pr  = cmul(g_mat[i][j], x[j], 1'b0);
          sre = acc[i].re + pr.re;
          sim = acc[i].im + pr.im;
          acc[i].re <= sre;
          acc[i].im <= sim;
          if (j == JW'(U - 1)) begin
            g[i].re <= requant(sre - (acc_t'(m[i].re) <<< FRAC));
            g[i].im <= requant(sim - (acc_t'(m[i].im) <<< FRAC));
          end
        end
        if (j == JW'(U - 1)) begin
          busy <= 1'b0;
          j    <= '0;
          done <= 1'b1;
        end else begin
          j <= j + 1'b1;
        end
      end
    end
  end
endmodule
