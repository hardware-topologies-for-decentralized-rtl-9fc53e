// dn_ref_pkg - reference model of the DN detector for the testbenches.
//
// Plain integer model of the decentralized Newton detection, written from the
// equations rather than from the RTL: complex values are pairs of ints holding
// Q4.12 numbers; products are exact in longint; a result is brought back to 16
// bits by floor division by 2^12 and clipping to [-32768, 32767]; a division
// a / d of Q4.12 numbers is trunc(a * 4096 / d), clipped, with a non-positive d
// giving the extreme value of a's sign. Arrays are flat: H of cluster c, antenna
// b, user u sits at (c*BC + b)*U + u. The ring model clips after every cluster's
// addition (the order in which the ring adds); the star model sums all
// contributions and clips once.
package dn_ref_pkg;

  function automatic int clip16(longint v);
    if (v > 32767)  return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  // floor(v / 4096), then clip
  function automatic int rq(longint v);
    longint q;
    q = v / 4096;
    if ((v % 4096 != 0) && (v < 0)) q = q - 1;
    return clip16(q);
  endfunction

  function automatic int rdiv(int a, int d);
    longint n, q;
    if (d <= 0) return (a < 0) ? -32768 : 32767;
    n = longint'(a) * 4096;
    q = n / d;      // truncates toward zero
    return clip16(q);
  endfunction

  class dn_model;
    int U, BC, C, T;
    int h_re[], h_im[];       // [(c*BC+b)*U+u]
    int y_re[], y_im[];       // [c*BC+b]
    int g_re[], g_im[];       // Gram: [(c*U+i)*U+j]
    int d[];                  // [c*U+u]
    int m_re[], m_im[];       // [c*U+u]
    int xc_re[], xc_im[];     // [c*U+u]
    int x_re[], x_im[];       // final estimate [u]

    function new(int U_, int BC_, int C_, int T_);
      U = U_; BC = BC_; C = C_; T = T_;
      h_re = new[C*BC*U]; h_im = new[C*BC*U];
      y_re = new[C*BC];   y_im = new[C*BC];
      g_re = new[C*U*U];  g_im = new[C*U*U];
      d    = new[C*U];
      m_re = new[C*U];    m_im = new[C*U];
      xc_re = new[C*U];   xc_im = new[C*U];
      x_re = new[U];      x_im = new[U];
    endfunction

    function int hi(int c, int b, int u); return (c*BC + b)*U + u; endfunction

    // Gram matrix and its diagonal for cluster c
    function void gram(int c);
      for (int i = 0; i < U; i++)
        for (int j = 0; j < U; j++) begin
          longint sr = 0, si = 0;
          for (int b = 0; b < BC; b++) begin
            longint ar = h_re[hi(c,b,i)], ai = h_im[hi(c,b,i)];
            longint br = h_re[hi(c,b,j)], bi = h_im[hi(c,b,j)];
            sr += ar*br + ai*bi;
            si += ar*bi - ai*br;
          end
          g_re[(c*U+i)*U+j] = rq(sr);
          g_im[(c*U+i)*U+j] = rq(si);
          if (i == j) d[c*U+i] = rq(sr);
        end
    endfunction

    function void mf(int c);
      for (int u = 0; u < U; u++) begin
        longint sr = 0, si = 0;
        for (int b = 0; b < BC; b++) begin
          longint ar = h_re[hi(c,b,u)], ai = h_im[hi(c,b,u)];
          longint br = y_re[c*BC+b],    bi = y_im[c*BC+b];
          sr += ar*br + ai*bi;
          si += ar*bi - ai*br;
        end
        m_re[c*U+u] = rq(sr);
        m_im[c*U+u] = rq(si);
      end
    endfunction

    function void init_est(int c);
      for (int u = 0; u < U; u++) begin
        xc_re[c*U+u] = rdiv(m_re[c*U+u], d[c*U+u]);
        xc_im[c*U+u] = rdiv(m_im[c*U+u], d[c*U+u]);
      end
    endfunction

    // gradient of cluster c at x: G x - m
    function void grad(int c, input int xr[], input int xi[], ref int gr[], ref int gi[]);
      for (int i = 0; i < U; i++) begin
        longint sr = 0, si = 0;
        for (int j = 0; j < U; j++) begin
          longint ar = g_re[(c*U+i)*U+j], ai = g_im[(c*U+i)*U+j];
          sr += ar*xr[j] - ai*xi[j];
          si += ar*xi[j] + ai*xr[j];
        end
        sr -= longint'(m_re[c*U+i]) * 4096;
        si -= longint'(m_im[c*U+i]) * 4096;
        gr[i] = rq(sr);
        gi[i] = rq(si);
      end
    endfunction

    // Full detection; star = 0 for the ring order of additions.
    function void detect(bit star, bit new_channel);
      int dd[], qr[], qi[], gr[], gi[], xr[], xi[], xcr[], xci[];
      dd = new[U]; qr = new[U]; qi = new[U]; gr = new[U]; gi = new[U];
      xr = new[U]; xi = new[U]; xcr = new[U]; xci = new[U];
      for (int c = 0; c < C; c++) begin
        if (new_channel) gram(c);
        mf(c);
        init_est(c);
      end
      for (int t = 1; t <= T; t++) begin
        longint sq_r[], sq_i[], sd[];
        sq_r = new[U]; sq_i = new[U]; sd = new[U];
        for (int u = 0; u < U; u++) begin qr[u] = 0; qi[u] = 0; sq_r[u] = 0; sq_i[u] = 0; sd[u] = 0; end
        if (t == 1) for (int u = 0; u < U; u++) dd[u] = 0;
        for (int c = 0; c < C; c++) begin
          if (t == 1) begin
            for (int u = 0; u < U; u++) begin xcr[u] = xc_re[c*U+u]; xci[u] = xc_im[c*U+u]; end
            grad(c, xcr, xci, gr, gi);
          end else grad(c, xr, xi, gr, gi);
          for (int u = 0; u < U; u++) begin
            if (star) begin
              sq_r[u] += gr[u]; sq_i[u] += gi[u];
              if (t == 1) sd[u] += d[c*U+u];
            end else begin
              qr[u] = clip16(longint'(qr[u]) + gr[u]);
              qi[u] = clip16(longint'(qi[u]) + gi[u]);
              if (t == 1) dd[u] = clip16(longint'(dd[u]) + d[c*U+u]);
            end
          end
        end
        if (star)
          for (int u = 0; u < U; u++) begin
            qr[u] = clip16(sq_r[u]); qi[u] = clip16(sq_i[u]);
            if (t == 1) dd[u] = clip16(sd[u]);
          end
        if (t == 1)   // x(0) is the apex cluster's own initial estimate
          for (int u = 0; u < U; u++) begin xr[u] = xc_re[(C-1)*U+u]; xi[u] = xc_im[(C-1)*U+u]; end
        for (int u = 0; u < U; u++) begin
          xr[u] = clip16(longint'(xr[u]) - rdiv(qr[u], dd[u]));
          xi[u] = clip16(longint'(xi[u]) - rdiv(qi[u], dd[u]));
        end
      end
      for (int u = 0; u < U; u++) begin x_re[u] = xr[u]; x_im[u] = xi[u]; end
    endfunction
  endclass

  // 16-QAM hard decision of one component: levels -3A,-A,A,3A (A = 1024),
  // Gray labels 00,01,11,10.
  function automatic bit [1:0] qam_bits(int v);
    if (v < -2048) return 2'b00;
    if (v < 0)     return 2'b01;
    if (v < 2048)  return 2'b11;
    return 2'b10;
  endfunction

  // Random 16-QAM component level in Q4.12: one of -0.75, -0.25, 0.25, 0.75.
  function automatic int qam_level(int sel);
    case (sel & 3)
      0: return -3072;
      1: return -1024;
      2: return 1024;
      default: return 3072;
    endcase
  endfunction
endpackage
