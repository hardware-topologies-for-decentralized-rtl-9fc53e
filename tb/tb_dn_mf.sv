// tb_dn_mf - computes the matched filter H^H y for random channels and
// received samples (some at full scale, to saturate) and compares with the
// reference model; checks the BC + 1 cycle latency.
`timescale 1ns/1ps
module tb_dn_mf;
  import dn_pkg::*;
  import dn_ref_pkg::*;
  localparam int U = 3, BC = 5, AW = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, done;
  logic [AW-1:0] raddr;
  cplx_t [U-1:0] hrow, m_out;
  cplx_t y;
  int checks = 0, failures = 0;
  dn_model m;
  int hr[U*BC], hi_[U*BC], yr[BC], yi[BC];   // copies read by the memory model

  dn_mf #(.U(U), .BC(BC)) dut (.clk, .rst_n, .start, .raddr, .hrow, .y, .done, .m(m_out));

  always_comb begin
    for (int u = 0; u < U; u++) begin
      hrow[u].re = 16'(hr[int'(raddr)*U + u]);
      hrow[u].im = 16'(hi_[int'(raddr)*U + u]);
    end
    y.re = 16'(yr[int'(raddr)]);
    y.im = 16'(yi[int'(raddr)]);
  end

  initial begin
    m = new(U, BC, 1, 1);
    start = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int trial = 0; trial < 6; trial++) begin
      int lat;
      int span = (trial >= 4) ? 32767 : 3000;
      foreach (m.h_re[i]) begin
        m.h_re[i] = int'($urandom_range(2*span)) - span;
        m.h_im[i] = int'($urandom_range(2*span)) - span;
      end
      foreach (m.y_re[i]) begin
        m.y_re[i] = int'($urandom_range(2*span)) - span;
        m.y_im[i] = int'($urandom_range(2*span)) - span;
      end
      foreach (hr[i]) begin hr[i] = m.h_re[i]; hi_[i] = m.h_im[i]; end
      foreach (yr[i]) begin yr[i] = m.y_re[i]; yi[i] = m.y_im[i]; end
      m.mf(0);
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      checks++;
      if (lat != BC + 1) begin failures++; $display("FAIL latency %0d", lat); end
      for (int u = 0; u < U; u++) begin
        checks++;
        if (int'(m_out[u].re) != m.m_re[u] || int'(m_out[u].im) != m.m_im[u]) begin
          failures++; $display("FAIL m[%0d] = (%0d,%0d) exp (%0d,%0d)", u,
            m_out[u].re, m_out[u].im, m.m_re[u], m.m_im[u]);
        end
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
