// tb_dn_grad - gradient unit: random Gram matrices, estimates and matched
// filter outputs (small and full scale), result compared with the reference
// model's G x - m; checks the U + 1 cycle latency.
`timescale 1ns/1ps
module tb_dn_grad;
  import dn_pkg::*;
  import dn_ref_pkg::*;
  localparam int U = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, done;
  cplx_t [U-1:0][U-1:0] g_mat;
  cplx_t [U-1:0] x, m, g;
  int checks = 0, failures = 0;
  dn_model mod;
  int xr[], xi[], gr[], gi[];

  dn_grad #(.U(U)) dut (.*);

  initial begin
    mod = new(U, 1, 1, 1);
    xr = new[U]; xi = new[U]; gr = new[U]; gi = new[U];
    start = 0; g_mat = '0; x = '0; m = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int trial = 0; trial < 20; trial++) begin
      int lat;
      int span = (trial % 4 == 3) ? 32767 : 4096;
      for (int i = 0; i < U; i++) begin
        for (int j = 0; j < U; j++) begin
          g_mat[i][j].re = 16'(int'($urandom_range(2*span)) - span);
          g_mat[i][j].im = 16'(int'($urandom_range(2*span)) - span);
          mod.g_re[i*U+j] = int'(g_mat[i][j].re);
          mod.g_im[i*U+j] = int'(g_mat[i][j].im);
        end
        x[i].re = 16'(int'($urandom_range(2*span)) - span);
        x[i].im = 16'(int'($urandom_range(2*span)) - span);
        m[i].re = 16'(int'($urandom_range(2*span)) - span);
        m[i].im = 16'(int'($urandom_range(2*span)) - span);
        xr[i] = int'(x[i].re); xi[i] = int'(x[i].im);
        mod.m_re[i] = int'(m[i].re); mod.m_im[i] = int'(m[i].im);
      end
      mod.grad(0, xr, xi, gr, gi);
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      checks++;
      if (lat != U + 1) begin failures++; $display("FAIL latency %0d", lat); end
      for (int i = 0; i < U; i++) begin
        checks++;
        if (int'(g[i].re) != gr[i] || int'(g[i].im) != gi[i]) begin
          failures++; $display("FAIL g[%0d] = (%0d,%0d) exp (%0d,%0d)", i, g[i].re, g[i].im, gr[i], gi[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
