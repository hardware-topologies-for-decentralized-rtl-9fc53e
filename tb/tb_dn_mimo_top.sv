// tb_dn_mimo_top - full-size end-to-end test of both detectors.
//
// Runs dn_mimo_top with all parameters at their defaults (B = 128 antennas in
// C = 4 clusters of 32, U = 8 users, T = 3 iterations, one ring sub-carrier
// plus the star). Both detectors get the same random channel and the same
// received 16-QAM symbols (y = H x + small noise, formed here); every symbol's
// x(T) and decisions are compared bit-exactly with dn_ref_pkg's ring and star
// models. Mechanisms counted, each of which must occur: Gram matrix
// recomputation for a new channel, Gram matrix reuse within a coherence
// interval, ring detection, star detection. Also checked: the star finishes
// in fewer cycles than the ring, every symbol of a detector takes the same
// number of cycles, and the decisions match the transmitted symbols in at
// least 90 % of the cases (low noise, B/U = 16).
`timescale 1ns/1ps
module tb_dn_mimo_top;
  import dn_pkg::*;
  import dn_ref_pkg::*;

  localparam int U = U_DEF, BC = BC_DEF, C = C_DEF, T = T_DEF;
  localparam int CW = $clog2(C), AW = $clog2(BC);
  localparam int NSYM = 6;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic  [0:0]               r_h_we, r_y_we, r_start, r_new, r_ready, r_xv;
  logic  [0:0][CW-1:0]       r_hc, r_yc;
  logic  [0:0][AW-1:0]       r_ha, r_ya;
  cplx_t [0:0][U-1:0]        r_hrow, r_x;
  cplx_t [0:0]               r_yd;
  logic  [0:0][U-1:0][3:0]   r_bits;
  logic                      s_h_we, s_y_we, s_start, s_new, s_ready, s_xv;
  logic  [CW-1:0]            s_hc, s_yc;
  logic  [AW-1:0]            s_ha, s_ya;
  cplx_t [U-1:0]             s_hrow, s_x;
  cplx_t                     s_yd;
  logic  [U-1:0][3:0]        s_bits;

  dn_mimo_top dut (
    .clk, .rst_n,
    .ring_h_we(r_h_we), .ring_h_cluster(r_hc), .ring_h_addr(r_ha), .ring_h_row(r_hrow),
    .ring_y_we(r_y_we), .ring_y_cluster(r_yc), .ring_y_addr(r_ya), .ring_y_data(r_yd),
    .ring_start(r_start), .ring_new_channel(r_new), .ring_ready(r_ready),
    .ring_x_valid(r_xv), .ring_x_out(r_x), .ring_bits(r_bits),
    .star_h_we(s_h_we), .star_h_cluster(s_hc), .star_h_addr(s_ha), .star_h_row(s_hrow),
    .star_y_we(s_y_we), .star_y_cluster(s_yc), .star_y_addr(s_ya), .star_y_data(s_yd),
    .star_start(s_start), .star_new_channel(s_new), .star_ready(s_ready),
    .star_x_valid(s_xv), .star_x_out(s_x), .star_bits(s_bits));

  dn_model mr, ms;
  int sym_re[U], sym_im[U];
  int lat_r[NSYM], lat_s[NSYM];
  int n_new = 0, n_reuse = 0, n_ring = 0, n_star = 0, n_sym_ok = 0, n_sym = 0;

  function automatic void make_channel();
    foreach (mr.h_re[i]) begin
      mr.h_re[i] = int'($urandom_range(1536)) - 768;
      mr.h_im[i] = int'($urandom_range(1536)) - 768;
      ms.h_re[i] = mr.h_re[i];
      ms.h_im[i] = mr.h_im[i];
    end
  endfunction

  function automatic void make_signal();
    for (int c = 0; c < C; c++)
      for (int b = 0; b < BC; b++) begin
        longint sr = 0, si = 0;
        for (int u = 0; u < U; u++) begin
          sr += longint'(mr.h_re[mr.hi(c,b,u)]) * sym_re[u] - longint'(mr.h_im[mr.hi(c,b,u)]) * sym_im[u];
          si += longint'(mr.h_re[mr.hi(c,b,u)]) * sym_im[u] + longint'(mr.h_im[mr.hi(c,b,u)]) * sym_re[u];
        end
        mr.y_re[c*BC+b] = rq(sr) + int'($urandom_range(32)) - 16;
        mr.y_im[c*BC+b] = rq(si) + int'($urandom_range(32)) - 16;
        ms.y_re[c*BC+b] = mr.y_re[c*BC+b];
        ms.y_im[c*BC+b] = mr.y_im[c*BC+b];
      end
  endfunction

  task automatic load(bit with_h);
    for (int c = 0; c < C; c++)
      for (int b = 0; b < BC; b++) begin
        @(negedge clk);
        r_h_we[0] = with_h; r_hc[0] = CW'(c); r_ha[0] = AW'(b);
        s_h_we    = with_h; s_hc    = CW'(c); s_ha    = AW'(b);
        for (int u = 0; u < U; u++) begin
          r_hrow[0][u].re = 16'(mr.h_re[mr.hi(c,b,u)]);
          r_hrow[0][u].im = 16'(mr.h_im[mr.hi(c,b,u)]);
        end
        s_hrow = r_hrow[0];
        r_y_we[0] = 1; r_yc[0] = CW'(c); r_ya[0] = AW'(b);
        r_yd[0].re = 16'(mr.y_re[c*BC+b]); r_yd[0].im = 16'(mr.y_im[c*BC+b]);
        s_y_we = 1; s_yc = CW'(c); s_ya = AW'(b); s_yd = r_yd[0];
      end
    @(negedge clk); r_h_we = '0; r_y_we = '0; s_h_we = 0; s_y_we = 0;
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
      n_sym++;
      if (bits[u] == {qam_bits(sym_re[u]), qam_bits(sym_im[u])}) n_sym_ok++;
    end
  endtask

  task automatic run_symbol(bit newch, output int lr, output int ls);
    int cyc = 0;
    bit dr = 0, ds = 0;
    @(negedge clk);
    r_start = 1'b1; r_new = newch; s_start = 1; s_new = newch;
    @(negedge clk);
    r_start = 1'b0; s_start = 0;
    lr = -1; ls = -1;
    while (!(dr && ds)) begin
      @(posedge clk); #1;
      cyc++;
      if (r_xv[0] && !dr) begin dr = 1; lr = cyc; n_ring++; end
      if (s_xv && !ds)    begin ds = 1; ls = cyc; n_star++; end
    end
  endtask

  initial begin
    r_h_we = '0; r_y_we = '0; r_start = '0; r_new = '0; r_hc = '0; r_yc = '0;
    r_ha = '0; r_ya = '0; r_hrow = '0; r_yd = '0;
    s_h_we = 0; s_y_we = 0; s_start = 0; s_new = 0; s_hc = '0; s_yc = '0;
    s_ha = '0; s_ya = '0; s_hrow = '0; s_yd = '0;
    mr = new(U, BC, C, T);
    ms = new(U, BC, C, T);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < NSYM; s++) begin
      bit newch;
      newch = (s % 3 == 0);
      if (newch) make_channel();
      for (int u = 0; u < U; u++) begin
        sym_re[u] = qam_level(int'($urandom)); sym_im[u] = qam_level(int'($urandom));
      end
      make_signal();
      load(newch);
      mr.detect(0, newch); ms.detect(1, newch);
      run_symbol(newch, lat_r[s], lat_s[s]);
      if (newch) n_new++; else n_reuse++;
      compare($sformatf("ring sym%0d", s), mr, r_x[0], r_bits[0]);
      compare($sformatf("star sym%0d", s), ms, s_x, s_bits);
      repeat (2) @(negedge clk);
      checks += 2;
      if (!r_ready[0] || !s_ready) begin failures++; $display("FAIL not ready after symbol"); end
      if (lat_r[s] != lat_r[0] || lat_s[s] != lat_s[0]) begin
        failures++; $display("FAIL latency varies: ring %0d star %0d", lat_r[s], lat_s[s]);
      end
    end
    $display("latency: ring %0d cycles, star %0d cycles", lat_r[0], lat_s[0]);
    $display("decisions equal to transmitted symbols: %0d of %0d", n_sym_ok, n_sym);
    checks += 2;
    if (lat_s[0] >= lat_r[0]) begin failures++; $display("FAIL star not faster than ring"); end
    if (n_sym_ok * 10 < n_sym * 9) begin failures++; $display("FAIL too many symbol errors"); end
    $display("mechanisms: gram_recompute=%0d gram_reuse=%0d ring_detect=%0d star_detect=%0d",
             n_new, n_reuse, n_ring, n_star);
    checks += 4;
    if (n_new == 0)   begin failures++; $display("FAIL no Gram recomputation exercised"); end
    if (n_reuse == 0) begin failures++; $display("FAIL no Gram reuse exercised"); end
    if (n_ring == 0)  begin failures++; $display("FAIL ring never finished"); end
    if (n_star == 0)  begin failures++; $display("FAIL star never finished"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
