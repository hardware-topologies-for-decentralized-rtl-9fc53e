// tb_dn_vdiv - initial-estimate divider: random complex numerators divided by
// positive real divisors, plus corner cases (zero divisor, most negative
// numerator, quotients that saturate), compared with the reference model's
// division; checks the W + FRAC + 1 cycle latency.
`timescale 1ns/1ps
module tb_dn_vdiv;
  import dn_pkg::*;
  import dn_ref_pkg::*;
  localparam int U = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, done;
  cplx_t [U-1:0] m, x;
  word_t [U-1:0] d;
  int checks = 0, failures = 0;

  dn_vdiv #(.U(U)) dut (.*);

  initial begin
    start = 0; m = '0; d = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int trial = 0; trial < 30; trial++) begin
      int lat;
      for (int u = 0; u < U; u++) begin
        m[u] = cplx_t'($urandom);
        d[u] = word_t'($urandom_range(32767, 1));
        if (trial % 3 == 0) d[u] = word_t'($urandom_range(8192, 256));
      end
      if (trial == 1) begin d[0] = '0; m[0].re = -16'sd5; m[0].im = 16'sd7; end
      if (trial == 2) begin m[1].re = WORD_MIN; d[1] = 16'sd4096; m[2].im = WORD_MAX; d[2] = 16'sd1; end
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      checks++;
      if (lat != W + FRAC + 1) begin failures++; $display("FAIL latency %0d", lat); end
      for (int u = 0; u < U; u++) begin
        checks += 2;
        if (int'(x[u].re) != rdiv(int'(m[u].re), int'(d[u]))) begin
          failures++; $display("FAIL re %0d/%0d = %0d exp %0d", m[u].re, d[u], x[u].re, rdiv(int'(m[u].re), int'(d[u])));
        end
        if (int'(x[u].im) != rdiv(int'(m[u].im), int'(d[u]))) begin
          failures++; $display("FAIL im %0d/%0d = %0d exp %0d", m[u].im, d[u], x[u].im, rdiv(int'(m[u].im), int'(d[u])));
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
