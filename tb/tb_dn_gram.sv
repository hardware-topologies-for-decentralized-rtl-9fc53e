// tb_dn_gram - computes the Gram matrix and diagonal of random channels
// (including full-scale entries that saturate) and compares with the
// reference model; checks the BC + 1 cycle latency and that the row address
// sweeps 0 .. BC-1.
`timescale 1ns/1ps
module tb_dn_gram;
  import dn_pkg::*;
  import dn_ref_pkg::*;
  localparam int U = 3, BC = 5, AW = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, done;
  logic [AW-1:0] raddr;
  cplx_t [U-1:0] hrow;
  cplx_t [U-1:0][U-1:0] g;
  word_t [U-1:0] diag;
  int checks = 0, failures = 0;
  dn_model m;
  int hr[U*BC], hi_[U*BC], yr[BC], yi[BC];   // copies read by the memory model

  dn_gram #(.U(U), .BC(BC)) dut (.*);

  always_comb
    for (int u = 0; u < U; u++) begin
      hrow[u].re = 16'(hr[int'(raddr)*U + u]);
      hrow[u].im = 16'(hi_[int'(raddr)*U + u]);
    end

  initial begin
    m = new(U, BC, 1, 1);
    start = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int trial = 0; trial < 6; trial++) begin
      int lat = 0;
      int span = (trial >= 4) ? 32767 : 3000;
      foreach (m.h_re[i]) begin
        m.h_re[i] = int'($urandom_range(2*span)) - span;
        m.h_im[i] = int'($urandom_range(2*span)) - span;
      end
      foreach (hr[i]) begin hr[i] = m.h_re[i]; hi_[i] = m.h_im[i]; end
      m.gram(0);
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      checks++;
      if (lat != BC + 1) begin failures++; $display("FAIL latency %0d", lat); end
      for (int i = 0; i < U; i++) begin
        for (int j = 0; j < U; j++) begin
          checks++;
          if (int'(g[i][j].re) != m.g_re[i*U+j] || int'(g[i][j].im) != m.g_im[i*U+j]) begin
            failures++; $display("FAIL G[%0d][%0d] = (%0d,%0d) exp (%0d,%0d)", i, j,
              g[i][j].re, g[i][j].im, m.g_re[i*U+j], m.g_im[i*U+j]);
          end
        end
        checks++;
        if (int'(diag[i]) != m.d[i]) begin failures++; $display("FAIL diag %0d", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
