// dn_aggregate - sums N partial vectors of U complex entries.
//
// Used wherever the detector accumulates partial computations from several
// clusters: the Aggregate blocks of the star apex (N = C: the C-1 received
// vectors plus the apex's own) and the two-input adders of the ring clusters
// (N = 2: received vector plus local contribution). The sum is formed at full
// width and saturated once to 16-bit components. Purely combinational.
module dn_aggregate
  import dn_pkg::*;
#(
  parameter int U = U_DEF,
  parameter int N = C_DEF
) (
  input  cplx_t [N-1:0][U-1:0] parts,
  output cplx_t [U-1:0]        sum
);
  always_comb begin
    for (int u = 0; u < U; u++) begin
      acc_t sre, sim;
      sre = '0;
      sim = '0;
      for (int k = 0; k < N; k++) begin
        sre = sre + acc_t'(parts[k][u].re);
        sim = sim + acc_t'(parts[k][u].im);
      end
      sum[u].re = sat(sre);
      sum[u].im = sat(sim);
    end
  end
endmodule
