// tb_dn_cluster_core - one cluster's local computations: loads H_c and y_c,
// starts a symbol with a new channel and checks D_c, the initial estimate x_c
// and the gradient at x_c (multiplexer on the local side) and at an external
// x (multiplexer on the broadcast side) against the reference model. A second
// symbol reuses the Gram matrix although a different H has been written, so
// the result must still follow the old channel. Latencies checked: initial
// estimate after BC + 1 + W + FRAC + 1 cycles, gradient after U + 1 cycles.
`timescale 1ns/1ps
module tb_dn_cluster_core;
  import dn_pkg::*;
  import dn_ref_pkg::*;
  localparam int U = 4, BC = 8, AW = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic h_we, y_we, start, new_channel, est_done, grad_start, x_sel_local, grad_done;
  logic [AW-1:0] h_waddr, y_waddr;
  cplx_t [U-1:0] h_wrow, x_c, x_ext, g;
  cplx_t y_wdata;
  word_t [U-1:0] d;
  int checks = 0, failures = 0;
  dn_model m;
  int xr[], xi[], gr[], gi[];

  dn_cluster_core #(.U(U), .BC(BC)) dut (.*);

  task automatic load(bit with_h, bit with_y);
    for (int b = 0; b < BC; b++) begin
      @(negedge clk);
      h_we = with_h; y_we = with_y; h_waddr = AW'(b); y_waddr = AW'(b);
      for (int u = 0; u < U; u++) begin
        h_wrow[u].re = 16'(m.h_re[b*U+u]); h_wrow[u].im = 16'(m.h_im[b*U+u]);
      end
      y_wdata.re = 16'(m.y_re[b]); y_wdata.im = 16'(m.y_im[b]);
    end
    @(negedge clk); h_we = 0; y_we = 0;
  endtask

  task automatic rand_h();
    foreach (m.h_re[i]) begin
      m.h_re[i] = int'($urandom_range(1536)) - 768;
      m.h_im[i] = int'($urandom_range(1536)) - 768;
    end
  endtask

  task automatic rand_y();
    foreach (m.y_re[i]) begin
      m.y_re[i] = int'($urandom_range(4000)) - 2000;
      m.y_im[i] = int'($urandom_range(4000)) - 2000;
    end
  endtask

  task automatic check_grad(bit local_x, string tag);
    int lat;
    if (!local_x)
      for (int u = 0; u < U; u++) begin
        x_ext[u].re = 16'(int'($urandom_range(6000)) - 3000);
        x_ext[u].im = 16'(int'($urandom_range(6000)) - 3000);
      end
    for (int u = 0; u < U; u++) begin
      xr[u] = local_x ? m.xc_re[u] : int'(x_ext[u].re);
      xi[u] = local_x ? m.xc_im[u] : int'(x_ext[u].im);
    end
    m.grad(0, xr, xi, gr, gi);
    @(negedge clk); x_sel_local = local_x; grad_start = 1; @(negedge clk); grad_start = 0;
    lat = 1;
    while (!grad_done) begin @(negedge clk); lat++; end
    checks++;
    if (lat != U + 1) begin failures++; $display("FAIL %s grad latency %0d", tag, lat); end
    for (int u = 0; u < U; u++) begin
      checks++;
      if (int'(g[u].re) != gr[u] || int'(g[u].im) != gi[u]) begin
        failures++; $display("FAIL %s g[%0d] = (%0d,%0d) exp (%0d,%0d)", tag, u, g[u].re, g[u].im, gr[u], gi[u]);
      end
    end
  endtask

  task automatic run_symbol(bit newch, string tag);
    int lat;
    if (newch) m.gram(0);
    m.mf(0);
    m.init_est(0);
    @(negedge clk); start = 1; new_channel = newch; @(negedge clk); start = 0;
    lat = 1;
    while (!est_done) begin @(negedge clk); lat++; end
    checks++;
    if (lat != BC + 1 + W + FRAC + 1) begin failures++; $display("FAIL %s estimate latency %0d", tag, lat); end
    for (int u = 0; u < U; u++) begin
      checks += 2;
      if (int'(d[u]) != m.d[u]) begin failures++; $display("FAIL %s d[%0d] %0d exp %0d", tag, u, d[u], m.d[u]); end
      if (int'(x_c[u].re) != m.xc_re[u] || int'(x_c[u].im) != m.xc_im[u]) begin
        failures++; $display("FAIL %s x_c[%0d] = (%0d,%0d) exp (%0d,%0d)", tag, u, x_c[u].re, x_c[u].im, m.xc_re[u], m.xc_im[u]);
      end
    end
    check_grad(1, tag);
    check_grad(0, tag);
  endtask

  initial begin
    m = new(U, BC, 1, 1);
    xr = new[U]; xi = new[U]; gr = new[U]; gi = new[U];
    h_we = 0; y_we = 0; start = 0; new_channel = 0; grad_start = 0; x_sel_local = 1;
    h_waddr = 0; y_waddr = 0; h_wrow = '0; y_wdata = '0; x_ext = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    rand_h(); rand_y(); load(1, 1);
    run_symbol(1, "new channel");
    rand_y(); load(0, 1);
    run_symbol(0, "reuse");
    // write a different H but keep the Gram matrix: MF uses the new H,
    // G and D_c stay those of the old channel.
    begin
      int gre[], gim[], dd[];
      gre = m.g_re; gim = m.g_im; dd = m.d;
      rand_h(); rand_y(); load(1, 1);
      m.g_re = gre; m.g_im = gim; m.d = dd;
      run_symbol(0, "stale gram");
    end
    rand_y(); load(0, 1);
    run_symbol(1, "recompute");
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
