// tb_dn_star_apex - the star's apex cluster with two non-apex clusters (C = 3)
// played by the testbench, T = 2. In iteration 1 both up links deliver
// p_c = diag(D_c) and q_c = g_c at the same time; the apex must form
// D = p_0 + p_1 + diag(D_C) and q = q_0 + q_1 + g(x_C) (summed, then
// saturated) and broadcast x(1) = x_C - D^-1 q on both down links with q = 0.
// In iteration 2 the links deliver p = 0 and new q_c, and
// x(2) = x(1) - D^-1 (q_0 + q_1 + g(x(1))) must appear on x_out with one
// x_valid pulse and nothing more sent. Each down link is throttled at random
// on its own so the lock-step broadcast stalls. Expected values come from the
// reference model's arithmetic.
`timescale 1ns/1ps
module tb_dn_star_apex;
  import dn_pkg::*;
  import dn_ref_pkg::*;
  localparam int U = 4, BC = 8, C = 3, T = 2, AW = 3, L = C - 1;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic h_we, y_we, start, new_channel, busy, x_valid;
  logic [L-1:0] up_valid, up_ready, dn_valid, dn_ready;
  beat_t [L-1:0] up_data, dn_data;
  cplx_t [U-1:0] x_out;
  int n_xvalid = 0;
  logic [AW-1:0] h_waddr, y_waddr;
  cplx_t [U-1:0] h_wrow;
  cplx_t y_wdata;
  int checks = 0, failures = 0, stalls = 0;
  dn_model m;
  int xr[], xi[], gr[], gi[];
  cplx_t [L-1:0][U-1:0] p_send, q_send, p_got, q_got;

  dn_star_apex #(.U(U), .BC(BC), .C(C), .T(T), .DEPTH(U)) dut (.*);
  always @(posedge clk) if (rst_n && (x_valid)) n_xvalid++;

  always @(negedge clk) for (int k = 0; k < L; k++) dn_ready[k] <= ($urandom_range(1) == 0);
  always @(posedge clk) if (rst_n && (|(dn_valid & ~dn_ready))) stalls++;

  task automatic send_vec(int k);
    for (int u = 0; u < U; u++) begin
      @(negedge clk);
      up_valid[k] = 1; up_data[k].p = p_send[k][u]; up_data[k].q = q_send[k][u];
      @(posedge clk);
      while (!up_ready[k]) @(posedge clk);
    end
    @(negedge clk); up_valid[k] = 0;
  endtask

  task automatic recv_vec(int k);
    for (int u = 0; u < U; u++) begin
      @(posedge clk);
      while (!(dn_valid[k] && dn_ready[k])) @(posedge clk);
      p_got[k][u] = dn_data[k].p; q_got[k][u] = dn_data[k].q;
    end
  endtask

  task automatic send_all();
    fork send_vec(0); send_vec(1); join
  endtask

  task automatic recv_all();
    fork recv_vec(0); recv_vec(1); join
  endtask

  initial begin
    int dd[], x1r[], x1i[], x2r[], x2i[];
    longint sr, si, sd;
    m = new(U, BC, 1, T);
    xr = new[U]; xi = new[U]; gr = new[U]; gi = new[U];
    dd = new[U]; x1r = new[U]; x1i = new[U]; x2r = new[U]; x2i = new[U];
    h_we = 0; y_we = 0; start = 0; new_channel = 0; up_valid = '0; up_data = '0;
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
    // iteration 1: diag(D_c) and g_c(x_c) from both clusters
    for (int k = 0; k < L; k++)
      for (int u = 0; u < U; u++) begin
        p_send[k][u].re = 16'($urandom_range(12000)); p_send[k][u].im = '0;
        q_send[k][u].re = 16'(int'($urandom_range(8000)) - 4000); q_send[k][u].im = 16'(int'($urandom_range(8000)) - 4000);
      end
    for (int u = 0; u < U; u++) begin xr[u] = m.xc_re[u]; xi[u] = m.xc_im[u]; end
    m.grad(0, xr, xi, gr, gi);
    for (int u = 0; u < U; u++) begin
      sd = longint'(m.d[u]); sr = longint'(gr[u]); si = longint'(gi[u]);
      for (int k = 0; k < L; k++) begin
        sd += longint'(p_send[k][u].re); sr += longint'(q_send[k][u].re); si += longint'(q_send[k][u].im);
      end
      dd[u] = clip16(sd);
      x1r[u] = clip16(longint'(m.xc_re[u]) - rdiv(clip16(sr), dd[u]));
      x1i[u] = clip16(longint'(m.xc_im[u]) - rdiv(clip16(si), dd[u]));
    end
    fork send_all(); recv_all(); join
    for (int k = 0; k < L; k++)
      for (int u = 0; u < U; u++) begin
        checks += 2;
        if (int'(p_got[k][u].re) != x1r[u] || int'(p_got[k][u].im) != x1i[u]) begin
          failures++; $display("FAIL link %0d x(1)[%0d] = (%0d,%0d) exp (%0d,%0d)", k, u, p_got[k][u].re, p_got[k][u].im, x1r[u], x1i[u]);
        end
        if (q_got[k][u] != '0) begin
          failures++; $display("FAIL link %0d q[%0d] not zero in the broadcast", k, u);
        end
      end
    // iteration 2: p = 0, new gradients
    for (int k = 0; k < L; k++)
      for (int u = 0; u < U; u++) begin
        p_send[k][u] = '0;
        q_send[k][u].re = 16'(int'($urandom_range(8000)) - 4000); q_send[k][u].im = 16'(int'($urandom_range(8000)) - 4000);
      end
    for (int u = 0; u < U; u++) begin xr[u] = x1r[u]; xi[u] = x1i[u]; end
    m.grad(0, xr, xi, gr, gi);
    for (int u = 0; u < U; u++) begin
      sr = longint'(gr[u]); si = longint'(gi[u]);
      for (int k = 0; k < L; k++) begin sr += longint'(q_send[k][u].re); si += longint'(q_send[k][u].im); end
      x2r[u] = clip16(longint'(x1r[u]) - rdiv(clip16(sr), dd[u]));
      x2i[u] = clip16(longint'(x1i[u]) - rdiv(clip16(si), dd[u]));
    end
    send_all();
    while (!x_valid) @(posedge clk);
    for (int u = 0; u < U; u++) begin
      checks++;
      if (int'(x_out[u].re) != x2r[u] || int'(x_out[u].im) != x2i[u]) begin
        failures++; $display("FAIL x(2)[%0d] = (%0d,%0d) exp (%0d,%0d)", u, x_out[u].re, x_out[u].im, x2r[u], x2i[u]);
      end
    end
    repeat (3) @(negedge clk);
    checks++; if (busy) begin failures++; $display("FAIL still busy after T iterations"); end
    checks++; if (stalls == 0) begin failures++; $display("FAIL no broadcast stall exercised"); end
    checks++; if (dn_valid != '0) begin failures++; $display("FAIL apex sent after the last iteration"); end
    checks++; if (n_xvalid != 1) begin failures++; $display("FAIL x_valid pulses: %0d", n_xvalid); end
    $display("broadcast stall cycles: %0d", stalls);
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
