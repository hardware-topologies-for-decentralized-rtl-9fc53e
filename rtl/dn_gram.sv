// dn_gram - Gram matrix unit: G = H_c^H H_c and its diagonal D_c.
//
// After a start pulse the unit sweeps the BC antenna rows of H_c, one row per
// clock, through raddr/hrow (an asynchronous read of the local memory). For
// every row b it adds conj(h[b][i]) * h[b][j] to all U x U accumulators at
// once, so the row loop of the matrix product is fully unrolled and the
// antenna loop runs in time. One cycle after the last row the accumulators are
// requantized to 16-bit components (shift by FRAC, saturate) into G, the real
// parts of the diagonal are copied to diag (the approximate local Hessian
// D_c, the squared column norms of H_c), and done pulses for one cycle: BC + 1
// cycles from start to done. G and diag hold their value until the next
// start. The computation follows the published design; the schedule and the number
// formats are this design's choices. Full U x U products are formed although
// G is Hermitian, keeping every entry a direct sum.
module dn_gram
  import dn_pkg::*;
#(
  parameter int U  = U_DEF,
  parameter int BC = BC_DEF,
  localparam int AW = (BC > 1) ? $clog2(BC) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  output logic [AW-1:0]         raddr,
  input  cplx_t [U-1:0]         hrow,
  output logic                  done,
  output cplx_t [U-1:0][U-1:0]  g,
  output word_t [U-1:0]         diag
);
  cacc_t acc [U][U];
  logic  busy;
  logic  [AW-1:0] b;

  assign raddr = b;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      b    <= '0;
      done <= 1'b0;
      g    <= '0;
      diag <= '0;
      for (int i = 0; i < U; i++)
        for (int j = 0; j < U; j++) acc[i][j] <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy <= 1'b1;
        b    <= '0;
        for (int i = 0; i < U; i++)
          for (int j = 0; j < U; j++) acc[i][j] <= '0;
      end else if (busy) begin
        for (int i = 0; i < U; i++)
          for (int j = 0; j < U; j++) begin
            cacc_t pr;
            pr = cmul(hrow[i], hrow[j], 1'b1);
            acc[i][j].re <= acc[i][j].re + pr.re;
            acc[i][j].im <= acc[i][j].im + pr.im;
          end
        if (b == AW'(BC - 1)) begin
          busy <= 1'b0;
          b    <= '0;
          // Requantize with the final row folded in.
          for (int i = 0; i < U; i++)
            for (int j = 0; j < U; j++) begin
              cacc_t pr;
              pr = cmul(hrow[i], hrow[j], 1'b1);
              g[i][j].re <= requant(acc[i][j].re + pr.re);
              g[i][j].im <= requant(acc[i][j].im + pr.im);
              if (i == j) diag[i] <= requant(acc[i][j].re + pr.re);
            end
          done <= 1'b1;
        end else begin
          b <= b + 1'b1;
        end
      end
    end
  end
endmodule
