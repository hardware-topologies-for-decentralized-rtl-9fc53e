// tb_dn_star_top - end-to-end test of the star-topology detector.
//
// Two stars (C = 2 and C = 3 clusters, U = 4 users, BC = 8 antennas per
// cluster, T = 3) are loaded with random channels and random 16-QAM symbols
// (received signal y = H x + small noise, formed here). Each symbol's x(T)
// and decisions are compared bit-exactly with dn_ref_pkg's star model. The
// test covers a new channel (Gram matrix recomputed) and symbols reusing the
// stored Gram matrix, and checks the latency: every symbol of one star takes
// the same number of cycles, and an extra cluster adds none, as the non-apex
// clusters of a star run in parallel.
`timescale 1ns/1ps
module tb_dn_star_top;
  import dn_pkg::*;
  import dn_ref_pkg::*;

  localparam int U = 4, BC = 8, T = 3;
  localparam int NSYM = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---------------- C = 2 ----------------
  logic          a_h_we, a_y_we, a_start, a_new, a_ready, a_xv;
  logic [0:0]    a_hc, a_yc;
  logic [2:0]    a_ha, a_ya;
  cplx_t [U-1:0] a_hrow, a_x;
  cplx_t         a_yd;
  logic [U-1:0][3:0] a_bits;
  dn_star_top #(.U(U), .BC(BC), .C(2), .T(T)) dut_a (
    .clk, .rst_n, .h_we(a_h_we), .h_cluster(a_hc), .h_addr(a_ha), .h_row(a_hrow),
    .y_we(a_y_we), .y_cluster(a_yc), .y_addr(a_ya), .y_data(a_yd),
    .start(a_start), .new_channel(a_new), .ready(a_ready),
    .x_valid(a_xv), .x_out(a_x), .bits(a_bits));

  // ---------------- C = 3 ----------------
  logic          b_h_we, b_y_we, b_start, b_new, b_ready, b_xv;
  logic [1:0]    b_hc, b_yc;
  logic [2:0]    b_ha, b_ya;
  cplx_t [U-1:0] b_hrow, b_x;
  cplx_t         b_yd;
  logic [U-1:0][3:0] b_bits;
  dn_star_top #(.U(U), .BC(BC), .C(3), .T(T)) dut_b (
    .clk, .rst_n, .h_we(b_h_we), .h_cluster(b_hc), .h_addr(b_ha), .h_row(b_hrow),
    .y_we(b_y_we), .y_cluster(b_yc), .y_addr(b_ya), .y_data(b_yd),
    .start(b_start), .new_channel(b_new), .ready(b_ready),
    .x_valid(b_xv), .x_out(b_x), .bits(b_bits));

  dn_model ma, mb;
  int sym_re[U], sym_im[U];
  int lat_a[NSYM], lat_b[NSYM];
  int n_new = 0, n_reuse = 0;

  function automatic void make_channel(dn_model m);
    foreach (m.h_re[i]) begin
      m.h_re[i] = int'($urandom_range(1536)) - 768;
      m.h_im[i] = int'($urandom_range(1536)) - 768;
    end
  endfunction

  function automatic void make_signal(dn_model m);
    for (int c = 0; c < m.C; c++)
      for (int b = 0; b < m.BC; b++) begin
        longint sr = 0, si = 0;
        for (int u = 0; u < m.U; u++) begin
          sr += longint'(m.h_re[m.hi(c,b,u)]) * sym_re[u] - longint'(m.h_im[m.hi(c,b,u)]) * sym_im[u];
          si += longint'(m.h_re[m.hi(c,b,u)]) * sym_im[u] + longint'(m.h_im[m.hi(c,b,u)]) * sym_re[u];
        end
        m.y_re[c*m.BC+b] = rq(sr) + int'($urandom_range(16)) - 8;
        m.y_im[c*m.BC+b] = rq(si) + int'($urandom_range(16)) - 8;
      end
  endfunction

  task automatic load_a(bit with_h);
    for (int c = 0; c < 2; c++)
      for (int b = 0; b < BC; b++) begin
        @(negedge clk);
        a_h_we = with_h; a_hc = 1'(c); a_ha = 3'(b);
        for (int u = 0; u < U; u++) begin
          a_hrow[u].re = 16'(ma.h_re[ma.hi(c,b,u)]);
          a_hrow[u].im = 16'(ma.h_im[ma.hi(c,b,u)]);
        end
        a_y_we = 1; a_yc = 1'(c); a_ya = 3'(b);
        a_yd.re = 16'(ma.y_re[c*BC+b]); a_yd.im = 16'(ma.y_im[c*BC+b]);
      end
    @(negedge clk); a_h_we = 0; a_y_we = 0;
  endtask

  task automatic load_b(bit with_h);
    for (int c = 0; c < 3; c++)
      for (int b = 0; b < BC; b++) begin
        @(negedge clk);
        b_h_we = with_h; b_hc = 2'(c); b_ha = 3'(b);
        for (int u = 0; u < U; u++) begin
          b_hrow[u].re = 16'(mb.h_re[mb.hi(c,b,u)]);
          b_hrow[u].im = 16'(mb.h_im[mb.hi(c,b,u)]);
        end
        b_y_we = 1; b_yc = 2'(c); b_ya = 3'(b);
        b_yd.re = 16'(mb.y_re[c*BC+b]); b_yd.im = 16'(mb.y_im[c*BC+b]);
      end
    @(negedge clk); b_h_we = 0; b_y_we = 0;
  endtask

  task automatic compare(string tag, dn_model m, cplx_t [U-1:0] x, logic [U-1:0][3:0] bits);
    for (int u = 0; u < U; u++) begin
      checks += 2;
      if (int'(x[u].re) != m.x_re[u] || int'(x[u].im) != m.x_im[u]) begin
        failures++;
        $display("FAIL %s user %0d: x = (%0d,%0d) expected (%0d,%0d)", tag, u,
                 x[u].re, x[u].im, m.x_re[u], m.x_im[u]);
      end
      if (bits[u] != {qam_bits(m.x_re[u]), qam_bits(m.x_im[u])}) begin
        failures++;
        $display("FAIL %s user %0d: bits %b", tag, u, bits[u]);
      end
    end
  endtask

  // Runs one symbol on both stars at once and returns their latencies.
  task automatic run_symbol(bit newch, output int la, output int lb);
    int cyc = 0;
    bit da = 0, db = 0;
    @(negedge clk);
    a_start = 1; a_new = newch; b_start = 1; b_new = newch;
    @(negedge clk);
    a_start = 0; b_start = 0;
    la = -1; lb = -1;
    while (!(da && db)) begin
      @(posedge clk); #1;
      cyc++;
      if (a_xv && !da) begin da = 1; la = cyc; end
      if (b_xv && !db) begin db = 1; lb = cyc; end
    end
  endtask

  initial begin
    a_h_we = 0; a_y_we = 0; a_start = 0; a_new = 0; a_hc = 0; a_yc = 0; a_ha = 0; a_ya = 0;
    a_hrow = '0; a_yd = '0;
    b_h_we = 0; b_y_we = 0; b_start = 0; b_new = 0; b_hc = 0; b_yc = 0; b_ha = 0; b_ya = 0;
    b_hrow = '0; b_yd = '0;
    ma = new(U, BC, 2, T);
    mb = new(U, BC, 3, T);
    repeat (3) @(negedge clk);
    rst_n = 1;
    make_channel(ma); make_channel(mb);
    for (int s = 0; s < NSYM; s++) begin
      bit newch;
      newch = (s == 0) || (s == 2);
      if (s == 2) begin make_channel(ma); make_channel(mb); end
      for (int u = 0; u < U; u++) begin
        sym_re[u] = qam_level(int'($urandom)); sym_im[u] = qam_level(int'($urandom));
      end
      make_signal(ma); make_signal(mb);
      load_a(newch); load_b(newch);
      ma.detect(1, newch); mb.detect(1, newch);
      run_symbol(newch, lat_a[s], lat_b[s]);
      if (newch) n_new++; else n_reuse++;
      compare($sformatf("C2 sym%0d", s), ma, a_x, a_bits);
      compare($sformatf("C3 sym%0d", s), mb, b_x, b_bits);
      repeat (2) @(negedge clk);
      checks += 2;
      if (!a_ready || !b_ready) begin failures++; $display("FAIL not ready after symbol"); end
      if (lat_a[s] != lat_a[0] || lat_b[s] != lat_b[0]) begin
        failures++; $display("FAIL latency varies: %0d %0d", lat_a[s], lat_b[s]);
      end
    end
    $display("star latency: C=2 %0d cycles, C=3 %0d cycles", lat_a[0], lat_b[0]);
    // The non-apex clusters of a star work in parallel: an extra cluster
    // must not change the latency.
    checks++;
    if (lat_b[0] != lat_a[0]) begin
      failures++;
      $display("FAIL star latency depends on C: %0d vs %0d", lat_a[0], lat_b[0]);
    end
    checks += 2;
    if (n_new == 0)   begin failures++; $display("FAIL no Gram recomputation exercised"); end
    if (n_reuse == 0) begin failures++; $display("FAIL no Gram reuse exercised"); end
    $display("mechanisms: gram_recompute=%0d gram_reuse=%0d", n_new, n_reuse);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
