// tb_dn_ring_cluster - a ring non-apex cluster between a driven predecessor and
// a checking successor (T = 2). First iteration: the outgoing p must be the
// incoming p plus diag(D_c) and q the incoming q plus the gradient at the
// cluster's own initial estimate. Second iteration: p (now x(1)) passes
// unchanged and q adds the gradient at that x. The successor throttles
// out_ready at random so the OUT buffer stalls the cluster; the number of
// stall cycles must be non-zero. Expected values come from the reference model.
`timescale 1ns/1ps
module tb_dn_ring_cluster;
  import dn_pkg::*;
  import dn_ref_pkg::*;
  localparam int U = 4, BC = 8, T = 2, AW = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic h_we, y_we, start, new_channel, busy, in_valid, in_ready, out_valid, out_ready;
  logic [AW-1:0] h_waddr, y_waddr;
  cplx_t [U-1:0] h_wrow;
  cplx_t y_wdata;
  beat_t in_data, out_data;
  int checks = 0, failures = 0, stalls = 0;
  dn_model m;
  int xr[], xi[], gr[], gi[];
  cplx_t [U-1:0] p_send, q_send, p_got, q_got;
  bit throttle = 1;

  dn_ring_cluster #(.U(U), .BC(BC), .T(T), .DEPTH(U)) dut (.*);

  always @(negedge clk) out_ready <= throttle ? ($urandom_range(2) == 0) : 1'b1;
  always @(posedge clk) if (rst_n && (out_valid && !out_ready)) stalls++;

  task automatic send_vec();
    for (int u = 0; u < U; u++) begin
      @(negedge clk);
      in_valid = 1; in_data.p = p_send[u]; in_data.q = q_send[u];
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    @(negedge clk); in_valid = 0;
  endtask

  task automatic recv_vec();
    for (int u = 0; u < U; u++) begin
      @(posedge clk);
      while (!(out_valid && out_ready)) @(posedge clk);
      p_got[u] = out_data.p; q_got[u] = out_data.q;
    end
  endtask

  task automatic expect_vec(string tag, int ep_re[], int ep_im[], int eq_re[], int eq_im[]);
    for (int u = 0; u < U; u++) begin
      checks += 2;
      if (int'(p_got[u].re) != ep_re[u] || int'(p_got[u].im) != ep_im[u]) begin
        failures++; $display("FAIL %s p[%0d] = (%0d,%0d) exp (%0d,%0d)", tag, u, p_got[u].re, p_got[u].im, ep_re[u], ep_im[u]);
      end
      if (int'(q_got[u].re) != eq_re[u] || int'(q_got[u].im) != eq_im[u]) begin
        failures++; $display("FAIL %s q[%0d] = (%0d,%0d) exp (%0d,%0d)", tag, u, q_got[u].re, q_got[u].im, eq_re[u], eq_im[u]);
      end
    end
  endtask

  initial begin
    int ep_re[], ep_im[], eq_re[], eq_im[];
    m = new(U, BC, 1, T);
    xr = new[U]; xi = new[U]; gr = new[U]; gi = new[U];
    ep_re = new[U]; ep_im = new[U]; eq_re = new[U]; eq_im = new[U];
    h_we = 0; y_we = 0; start = 0; new_channel = 0; in_valid = 0; in_data = '0;
    h_waddr = 0; y_waddr = 0; h_wrow = '0; y_wdata = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    foreach (m.h_re[i]) begin m.h_re[i] = int'($urandom_range(1536)) - 768; m.h_im[i] = int'($urandom_range(1536)) - 768; end
    foreach (m.y_re[i]) begin m.y_re[i] = int'($urandom_range(4000)) - 2000; m.y_im[i] = int'($urandom_range(4000)) - 2000; end
    for (int b = 0; b < BC; b++) begin
      @(negedge clk); h_we = 1; y_we = 1; h_waddr = AW'(b); y_waddr = AW'(b);
      for (int u = 0; u < U; u++) begin h_wrow[u].re = 16'(m.h_re[b*U+u]); h_wrow[u].im = 16'(m.h_im[b*U+u]); end
      y_wdata.re = 16'(m.y_re[b]); y_wdata.im = 16'(m.y_im[b]);
    end
    @(negedge clk); h_we = 0; y_we = 0;
    m.gram(0); m.mf(0); m.init_est(0);
    @(negedge clk); start = 1; new_channel = 1; @(negedge clk); start = 0;
    checks++; if (!busy) begin failures++; $display("FAIL not busy"); end
    // iteration 1: p carries the partial Hessian diagonal, q the partial gradient
    for (int u = 0; u < U; u++) begin
      p_send[u].re = 16'($urandom_range(9000)); p_send[u].im = '0;
      q_send[u].re = 16'(int'($urandom_range(8000)) - 4000); q_send[u].im = 16'(int'($urandom_range(8000)) - 4000);
      xr[u] = m.xc_re[u]; xi[u] = m.xc_im[u];
    end
    m.grad(0, xr, xi, gr, gi);
    for (int u = 0; u < U; u++) begin
      ep_re[u] = clip16(longint'(p_send[u].re) + m.d[u]); ep_im[u] = 0;
      eq_re[u] = clip16(longint'(q_send[u].re) + gr[u]); eq_im[u] = clip16(longint'(q_send[u].im) + gi[u]);
    end
    fork send_vec(); recv_vec(); join
    expect_vec("t=1", ep_re, ep_im, eq_re, eq_im);
    // iteration 2: p carries x(1)
    for (int u = 0; u < U; u++) begin
      p_send[u].re = 16'(int'($urandom_range(6000)) - 3000); p_send[u].im = 16'(int'($urandom_range(6000)) - 3000);
      q_send[u].re = 16'(int'($urandom_range(8000)) - 4000); q_send[u].im = 16'(int'($urandom_range(8000)) - 4000);
      xr[u] = int'(p_send[u].re); xi[u] = int'(p_send[u].im);
    end
    m.grad(0, xr, xi, gr, gi);
    for (int u = 0; u < U; u++) begin
      ep_re[u] = int'(p_send[u].re); ep_im[u] = int'(p_send[u].im);
      eq_re[u] = clip16(longint'(q_send[u].re) + gr[u]); eq_im[u] = clip16(longint'(q_send[u].im) + gi[u]);
    end
    fork send_vec(); recv_vec(); join
    expect_vec("t=2", ep_re, ep_im, eq_re, eq_im);
    repeat (3) @(negedge clk);
    checks++; if (busy) begin failures++; $display("FAIL still busy after T iterations"); end
    checks++; if (stalls == 0) begin failures++; $display("FAIL no output stall exercised"); end
    $display("output stall cycles: %0d", stalls);
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
