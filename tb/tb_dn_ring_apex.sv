// tb_dn_ring_apex - the ring's apex cluster between a driven cluster C-1 and a
// checking cluster 1 (T = 2). At the symbol start the apex must send the
// all-zero vector. After the first incoming vector it must form
// D = p_in + diag(D_C), q = q_in + g(x_C) and broadcast x(1) = x_C - D^-1 q as
// p with q = 0; after the second, x(2) = x(1) - D^-1 (q_in + g(x(1))) must
// appear on x_out with x_valid, and nothing more may be sent. Cluster 1
// throttles out_ready at random. Expected values come from the reference
// model's arithmetic.
`timescale 1ns/1ps
module tb_dn_ring_apex;
  import dn_pkg::*;
  import dn_ref_pkg::*;
  localparam int U = 4, BC = 8, T = 2, AW = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic h_we, y_we, start, new_channel, busy, in_valid, in_ready, out_valid, out_ready, x_valid;
  cplx_t [U-1:0] x_out;
  int n_xvalid = 0;
  logic [AW-1:0] h_waddr, y_waddr;
  cplx_t [U-1:0] h_wrow;
  cplx_t y_wdata;
  beat_t in_data, out_data;
  int checks = 0, failures = 0, stalls = 0;
  dn_model m;
  int xr[], xi[], gr[], gi[];
  cplx_t [U-1:0] p_send, q_send, p_got, q_got;
  bit throttle = 1;

  dn_ring_apex #(.U(U), .BC(BC), .T(T), .DEPTH(U)) dut (.*);
  always @(posedge clk) if (rst_n && (x_valid)) n_xvalid++;

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
    begin
      int dd[], x1r[], x1i[], x2r[], x2i[], qr, qi;
      dd = new[U]; x1r = new[U]; x1i = new[U]; x2r = new[U]; x2i = new[U];
      // the zero vector that starts the ring
      recv_vec();
      for (int u = 0; u < U; u++) begin ep_re[u] = 0; ep_im[u] = 0; eq_re[u] = 0; eq_im[u] = 0; end
      expect_vec("start token", ep_re, ep_im, eq_re, eq_im);
      // iteration 1
      for (int u = 0; u < U; u++) begin
        p_send[u].re = 16'($urandom_range(9000)); p_send[u].im = '0;
        q_send[u].re = 16'(int'($urandom_range(8000)) - 4000); q_send[u].im = 16'(int'($urandom_range(8000)) - 4000);
        xr[u] = m.xc_re[u]; xi[u] = m.xc_im[u];
      end
      m.grad(0, xr, xi, gr, gi);
      for (int u = 0; u < U; u++) begin
        dd[u] = clip16(longint'(p_send[u].re) + m.d[u]);
        qr = clip16(longint'(q_send[u].re) + gr[u]); qi = clip16(longint'(q_send[u].im) + gi[u]);
        x1r[u] = clip16(longint'(m.xc_re[u]) - rdiv(qr, dd[u]));
        x1i[u] = clip16(longint'(m.xc_im[u]) - rdiv(qi, dd[u]));
        ep_re[u] = x1r[u]; ep_im[u] = x1i[u]; eq_re[u] = 0; eq_im[u] = 0;
      end
      fork send_vec(); recv_vec(); join
      expect_vec("broadcast x(1)", ep_re, ep_im, eq_re, eq_im);
      // iteration 2: p from cluster C-1 is x(1) passed around the ring
      for (int u = 0; u < U; u++) begin
        p_send[u].re = 16'(x1r[u]); p_send[u].im = 16'(x1i[u]);
        q_send[u].re = 16'(int'($urandom_range(8000)) - 4000); q_send[u].im = 16'(int'($urandom_range(8000)) - 4000);
        xr[u] = x1r[u]; xi[u] = x1i[u];
      end
      m.grad(0, xr, xi, gr, gi);
      for (int u = 0; u < U; u++) begin
        qr = clip16(longint'(q_send[u].re) + gr[u]); qi = clip16(longint'(q_send[u].im) + gi[u]);
        x2r[u] = clip16(longint'(x1r[u]) - rdiv(qr, dd[u]));
        x2i[u] = clip16(longint'(x1i[u]) - rdiv(qi, dd[u]));
      end
      send_vec();
      while (!x_valid) @(posedge clk);
      for (int u = 0; u < U; u++) begin
        checks++;
        if (int'(x_out[u].re) != x2r[u] || int'(x_out[u].im) != x2i[u]) begin
          failures++; $display("FAIL x(2)[%0d] = (%0d,%0d) exp (%0d,%0d)", u, x_out[u].re, x_out[u].im, x2r[u], x2i[u]);
        end
      end
    end
    repeat (3) @(negedge clk);
    checks++; if (busy) begin failures++; $display("FAIL still busy after T iterations"); end
    checks++; if (stalls == 0) begin failures++; $display("FAIL no output stall exercised"); end
    checks++; if (out_valid) begin failures++; $display("FAIL apex sent after the last iteration"); end
    checks++; if (n_xvalid != 1) begin failures++; $display("FAIL x_valid pulses: %0d", n_xvalid); end
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
