// tb_dn_aggregate - sums of N = 3 random vectors, small and full scale (to
// reach both saturation limits), compared with a clipped integer sum.
`timescale 1ns/1ps
module tb_dn_aggregate;
  import dn_pkg::*;
  import dn_ref_pkg::*;
  localparam int U = 2, N = 3;
  cplx_t [N-1:0][U-1:0] parts;
  cplx_t [U-1:0] sum;
  int checks = 0, failures = 0, n_sat = 0;

  dn_aggregate #(.U(U), .N(N)) dut (.*);

  initial begin
    for (int trial = 0; trial < 200; trial++) begin
      for (int k = 0; k < N; k++)
        for (int u = 0; u < U; u++) begin
          parts[k][u] = cplx_t'($urandom);
          if (trial % 2 == 0) begin
            parts[k][u].re = 16'(int'($urandom_range(8000)) - 4000);
            parts[k][u].im = 16'(int'($urandom_range(8000)) - 4000);
          end
        end
      #1;
      for (int u = 0; u < U; u++) begin
        longint sr, si;
        sr = 0; si = 0;
        for (int k = 0; k < N; k++) begin sr += longint'(parts[k][u].re); si += longint'(parts[k][u].im); end
        if (sr != clip16(sr)) n_sat++;
        checks++;
        if (int'(sum[u].re) != clip16(sr) || int'(sum[u].im) != clip16(si)) begin
          failures++; $display("FAIL sum[%0d] = (%0d,%0d) exp (%0d,%0d)", u, int'(sum[u].re), int'(sum[u].im), clip16(sr), clip16(si));
        end
      end
    end
    checks++; if (n_sat == 0) begin failures++; $display("FAIL saturation not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
