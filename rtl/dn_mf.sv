// dn_mf - matched filter unit: m = H_c^H y_c.
//
// After a start pulse the unit sweeps the BC antenna rows, one per clock,
// reading row b of H_c and sample y[b] through raddr (asynchronous read of
// the local memory), and adds conj(h[b][u]) * y[b] to U accumulators in
// parallel. With the last row folded in, the sums are requantized to 16-bit
// components (shift by FRAC, saturate) into m and done pulses: BC + 1 cycles
// from start to done. m holds until the next start. The function is the
// published design's; schedule and number format are this design's choices.
module dn_mf
  import dn_pkg::*;
#(
  parameter int U  = U_DEF,
  parameter int BC = BC_DEF,
  localparam int AW = (BC > 1) ? $clog2(BC) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  output logic [AW-1:0]  raddr,
  input  cplx_t [U-1:0]  hrow,
  input  cplx_t          y,
  output logic           done,
  output cplx_t [U-1:0]  m
);
  cacc_t acc [U];
  logic  busy;
  logic  [AW-1:0] b;

  assign raddr = b;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      b    <= '0;
      done <= 1'b0;
      m    <= '0;
      for (int u = 0; u < U; u++) acc[u] <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy <= 1'b1;
        b    <= '0;
        for (int u = 0; u < U; u++) acc[u] <= '0;
      end else if (busy) begin
        for (int u = 0; u < U; u++) begin
          cacc_t pr;
          pr = cmul(hrow[u], y, 1'b1);
          acc[u].re <= acc[u].re + pr.re;
          acc[u].im <= acc[u].im + pr.im;
          if (b == AW'(BC - 1)) begin
            m[u].re <= requant(acc[u].re + pr.re);
            m[u].im <= requant(acc[u].im + pr.im);
          end
        end
        if (b == AW'(BC - 1)) begin
          busy <= 1'b0;
          b    <= '0;
          done <= 1'b1;
        end else begin
          b <= b + 1'b1;
        end
      end
    end
  end
endmodule
