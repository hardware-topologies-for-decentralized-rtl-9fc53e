// tb_dn_newton_update - Newton step x(t) = x(t-1) - D^-1 q on random vectors,
// including steps that saturate, compared with the reference arithmetic;
// checks the W + FRAC + 2 cycle latency.
`timescale 1ns/1ps
module tb_dn_newton_update;
  import dn_pkg::*;
  import dn_ref_pkg::*;
  localparam int U = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, done;
  cplx_t [U-1:0] x_old, q, x_new;
  word_t [U-1:0] d;
  int checks = 0, failures = 0;

  dn_newton_update #(.U(U)) dut (.*);

  initial begin
    start = 0; x_old = '0; q = '0; d = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int trial = 0; trial < 25; trial++) begin
      int lat;
      for (int u = 0; u < U; u++) begin
        x_old[u] = cplx_t'($urandom);
        q[u]     = cplx_t'($urandom);
        d[u]     = word_t'($urandom_range(30000, 2000));
        if (trial % 5 == 4) d[u] = word_t'($urandom_range(300, 1));
      end
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      checks++;
      if (lat != W + FRAC + 2) begin failures++; $display("FAIL latency %0d", lat); end
      for (int u = 0; u < U; u++) begin
        int er, ei;
        er = clip16(longint'(x_old[u].re) - rdiv(int'(q[u].re), int'(d[u])));
        ei = clip16(longint'(x_old[u].im) - rdiv(int'(q[u].im), int'(d[u])));
        checks++;
        if (int'(x_new[u].re) != er || int'(x_new[u].im) != ei) begin
          failures++; $display("FAIL x[%0d] = (%0d,%0d) exp (%0d,%0d)", u, x_new[u].re, x_new[u].im, er, ei);
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
