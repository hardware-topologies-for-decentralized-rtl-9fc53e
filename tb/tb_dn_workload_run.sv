// tb_dn_workload_run - drives one dn_mimo_top configuration through a few
// symbols and checks it; instantiated once per configuration by
// tb_dn_workloads, which owns the clock, reset, watchdog and result line.
//
// Every ring sub-carrier gets its own random channel and 16-QAM symbols
// (y = H x + small noise); the star detector gets the data of sub-carrier 0.
// Symbol 0 brings a new channel, the others reuse it. All detectors start
// together; every x(T) and every 4-bit decision is compared bit-exactly with
// the reference models of dn_ref_pkg, the star must finish before the ring,
// the latency must be the same for every symbol and all sub-carriers, and at
// least 90 % of the decisions must equal the transmitted symbols. When done
// it raises fin and leaves its counts in checks and failures.
`timescale 1ns/1ps
module tb_dn_workload_run
  import dn_pkg::*;
  import dn_ref_pkg::*;
#(
  parameter int    U    = U_DEF,
  parameter int    BC   = BC_DEF,
  parameter int    C    = C_DEF,
  parameter int    T    = T_DEF,
  parameter int    N_SC = 1,
  parameter int    NSYM = 3,
  parameter string NAME = "default"
) (
  input  logic clk,
  input  logic rst_n,
  output logic fin,
  output int   checks,
  output int   failures
);
  localparam int CW = (C > 1) ? $clog2(C) : 1, AW = (BC > 1) ? $clog2(BC) : 1;

  logic  [N_SC-1:0]               r_h_we, r_y_we, r_start, r_new, r_ready, r_xv;
  logic  [N_SC-1:0][CW-1:0]       r_hc, r_yc;
  logic  [N_SC-1:0][AW-1:0]       r_ha, r_ya;
  cplx_t [N_SC-1:0][U-1:0]        r_hrow, r_x;
  cplx_t [N_SC-1:0]               r_yd;
  logic  [N_SC-1:0][U-1:0][3:0]   r_bits;
  logic                           s_h_we, s_y_we, s_start, s_new, s_ready, s_xv;
  logic  [CW-1:0]                 s_hc, s_yc;
  logic  [AW-1:0]                 s_ha, s_ya;
  cplx_t [U-1:0]                  s_hrow, s_x;
  cplx_t                          s_yd;
  logic  [U-1:0][3:0]             s_bits;

  dn_mimo_top #(.U(U), .BC(BC), .C(C), .T(T), .N_SC(N_SC), .DEPTH(U)) dut (
    .clk, .rst_n,
    .ring_h_we(r_h_we), .ring_h_cluster(r_hc), .ring_h_addr(r_ha), .ring_h_row(r_hrow),
    .ring_y_we(r_y_we), .ring_y_cluster(r_yc), .ring_y_addr(r_ya), .ring_y_data(r_yd),
    .ring_start(r_start), .ring_new_channel(r_new), .ring_ready(r_ready),
    .ring_x_valid(r_xv), .ring_x_out(r_x), .ring_bits(r_bits),
    .star_h_we(s_h_we), .star_h_cluster(s_hc), .star_h_addr(s_ha), .star_h_row(s_hrow),
    .star_y_we(s_y_we), .star_y_cluster(s_yc), .star_y_addr(s_ya), .star_y_data(s_yd),
    .star_start(s_start), .star_new_channel(s_new), .star_ready(s_ready),
    .star_x_valid(s_xv), .star_x_out(s_x), .star_bits(s_bits));

  dn_model mr[N_SC];
  dn_model ms;
  int sym_re[N_SC][U], sym_im[N_SC][U];
  int lat_r[N_SC], lat_s, lat_r0 = -1, lat_s0 = -1;
  int n_sym_ok = 0, n_sym = 0;

  function automatic void make_channel(int k);
    foreach (mr[k].h_re[i]) begin
      mr[k].h_re[i] = int'($urandom_range(1536)) - 768;
      mr[k].h_im[i] = int'($urandom_range(1536)) - 768;
    end
  endfunction

  function automatic void make_signal(int k);
    for (int c = 0; c < C; c++)
      for (int b = 0; b < BC; b++) begin
        longint sr, si;
        int hr, hi;
        sr = 0; si = 0;
        for (int u = 0; u < U; u++) begin
          hr = mr[k].h_re[mr[k].hi(c,b,u)]; hi = mr[k].h_im[mr[k].hi(c,b,u)];
          sr += longint'(hr) * sym_re[k][u] - longint'(hi) * sym_im[k][u];
          si += longint'(hr) * sym_im[k][u] + longint'(hi) * sym_re[k][u];
        end
        mr[k].y_re[c*BC+b] = rq(sr) + int'($urandom_range(32)) - 16;
        mr[k].y_im[c*BC+b] = rq(si) + int'($urandom_range(32)) - 16;
      end
  endfunction

  function automatic void copy_to_star();
    foreach (ms.h_re[i]) begin ms.h_re[i] = mr[0].h_re[i]; ms.h_im[i] = mr[0].h_im[i]; end
    foreach (ms.y_re[i]) begin ms.y_re[i] = mr[0].y_re[i]; ms.y_im[i] = mr[0].y_im[i]; end
  endfunction

  task automatic load(bit with_h);
    for (int c = 0; c < C; c++)
      for (int b = 0; b < BC; b++) begin
        @(negedge clk);
        for (int k = 0; k < N_SC; k++) begin
          r_h_we[k] = with_h; r_hc[k] = CW'(c); r_ha[k] = AW'(b);
          for (int u = 0; u < U; u++) begin
            r_hrow[k][u].re = 16'(mr[k].h_re[mr[k].hi(c,b,u)]);
            r_hrow[k][u].im = 16'(mr[k].h_im[mr[k].hi(c,b,u)]);
          end
          r_y_we[k] = 1; r_yc[k] = CW'(c); r_ya[k] = AW'(b);
          r_yd[k].re = 16'(mr[k].y_re[c*BC+b]); r_yd[k].im = 16'(mr[k].y_im[c*BC+b]);
        end
        s_h_we = with_h; s_hc = CW'(c); s_ha = AW'(b); s_hrow = r_hrow[0];
        s_y_we = 1; s_yc = CW'(c); s_ya = AW'(b); s_yd = r_yd[0];
      end
    @(negedge clk); r_h_we = '0; r_y_we = '0; s_h_we = 0; s_y_we = 0;
  endtask

  task automatic compare(string tag, dn_model m, int k, cplx_t [U-1:0] x, logic [U-1:0][3:0] bits);
    for (int u = 0; u < U; u++) begin
      checks += 2;
      if (int'(x[u].re) != m.x_re[u] || int'(x[u].im) != m.x_im[u]) begin
        failures++;
        $display("FAIL %s %s user %0d: x = (%0d,%0d) expected (%0d,%0d)", NAME, tag, u,
                 x[u].re, x[u].im, m.x_re[u], m.x_im[u]);
      end
      if (bits[u] != {qam_bits(m.x_re[u]), qam_bits(m.x_im[u])}) begin
        failures++;
        $display("FAIL %s %s user %0d: bits %b", NAME, tag, u, bits[u]);
      end
      n_sym++;
      if (bits[u] == {qam_bits(sym_re[k][u]), qam_bits(sym_im[k][u])}) n_sym_ok++;
    end
  endtask

  task automatic run_symbol(bit newch);
    int cyc;
    logic [N_SC-1:0] dr;
    bit ds;
    cyc = 0; dr = '0; ds = 0;
    @(negedge clk);
    r_start = '1; r_new = {N_SC{newch}}; s_start = 1; s_new = newch;
    @(negedge clk);
    r_start = '0; s_start = 0;
    while (!(&dr && ds)) begin
      @(posedge clk); #1;
      cyc++;
      for (int k = 0; k < N_SC; k++)
        if (r_xv[k] && !dr[k]) begin dr[k] = 1; lat_r[k] = cyc; end
      if (s_xv && !ds) begin ds = 1; lat_s = cyc; end
    end
  endtask

  initial begin
    fin = 0; checks = 0; failures = 0;
    r_h_we = '0; r_y_we = '0; r_start = '0; r_new = '0; r_hc = '0; r_yc = '0;
    r_ha = '0; r_ya = '0; r_hrow = '0; r_yd = '0;
    s_h_we = 0; s_y_we = 0; s_start = 0; s_new = 0; s_hc = '0; s_yc = '0;
    s_ha = '0; s_ya = '0; s_hrow = '0; s_yd = '0;
    for (int k = 0; k < N_SC; k++) mr[k] = new(U, BC, C, T);
    ms = new(U, BC, C, T);
    @(posedge rst_n);
    for (int s = 0; s < NSYM; s++) begin
      bit newch;
      newch = (s == 0);
      for (int k = 0; k < N_SC; k++) begin
        if (newch) make_channel(k);
        for (int u = 0; u < U; u++) begin
          sym_re[k][u] = qam_level(int'($urandom)); sym_im[k][u] = qam_level(int'($urandom));
        end
        make_signal(k);
        mr[k].detect(0, newch);
      end
      copy_to_star();
      ms.detect(1, newch);
      load(newch);
      run_symbol(newch);
      for (int k = 0; k < N_SC; k++) compare($sformatf("ring sc%0d sym%0d", k, s), mr[k], k, r_x[k], r_bits[k]);
      compare($sformatf("star sym%0d", s), ms, 0, s_x, s_bits);
      if (s == 0) begin lat_r0 = lat_r[0]; lat_s0 = lat_s; end
      for (int k = 0; k < N_SC; k++) begin
        checks++;
        if (lat_r[k] != lat_r0) begin failures++; $display("FAIL %s ring sc%0d latency %0d, first %0d", NAME, k, lat_r[k], lat_r0); end
      end
      checks++;
      if (lat_s != lat_s0) begin failures++; $display("FAIL %s star latency %0d, first %0d", NAME, lat_s, lat_s0); end
      repeat (2) @(negedge clk);
      checks++;
      if (!(&r_ready) || !s_ready) begin failures++; $display("FAIL %s not ready after symbol", NAME); end
    end
    checks += 2;
    if (lat_s0 >= lat_r0) begin failures++; $display("FAIL %s star not faster than ring", NAME); end
    if (n_sym_ok * 10 < n_sym * 9) begin failures++; $display("FAIL %s too many symbol errors", NAME); end
    $display("%s: U=%0d B=%0d C=%0d T=%0d sub-carriers=%0d: ring %0d cycles, star %0d cycles, decisions right %0d of %0d",
             NAME, U, C * BC, C, T, N_SC, lat_r0, lat_s0, n_sym_ok, n_sym);
    fin = 1;
  end
endmodule
