// dn_cluster_core - the local partial computations every cluster performs.
//
// This is the part shared by all four cluster kinds (ring/star, apex/non-apex):
// local memory for H_c and y_c, the Gram matrix unit (G = H_c^H H_c and its
// diagonal D_c), the matched filter (m = H_c^H y_c), the initial estimate
// (x_c = D_c^-1 m) and the gradient unit (g = G x - m) whose input x comes
// from a multiplexer steered by the iteration: x_c in the first iteration
// (x_sel_local = 1), the x(t-1) supplied on x_ext afterwards.
//
// Sequence: H_c and y_c are written through the load ports. A start pulse
// begins a symbol: the matched filter runs, and when new_channel is set the
// Gram matrix is recomputed in parallel (once per coherence interval; G and
// D_c are otherwise kept). Both take BC + 1 cycles. The initial estimate then
// takes W + FRAC + 1 cycles, after which est_done pulses and x_c and d are
// valid. Each grad_start pulse afterwards yields grad_done and g U + 1 cycles
// later; x_ext must stay stable meanwhile. Loading H_c or y_c while a symbol
// is being processed is not allowed. The block split follows the published design's
// cluster diagram; the handshake is this design's choice.
module dn_cluster_core
  import dn_pkg::*;
#(
  parameter int U  = U_DEF,
  parameter int BC = BC_DEF,
  localparam int AW = (BC > 1) ? $clog2(BC) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // loading of the local memory
  input  logic          h_we,
  input  logic [AW-1:0] h_waddr,
  input  cplx_t [U-1:0] h_wrow,
  input  logic          y_we,
  input  logic [AW-1:0] y_waddr,
  input  cplx_t         y_wdata,
  // symbol control
  input  logic          start,
  input  logic          new_channel,
  output logic          est_done,
  output word_t [U-1:0] d,
  output cplx_t [U-1:0] x_c,
  // gradient
  input  logic          grad_start,
  input  logic          x_sel_local,
  input  cplx_t [U-1:0] x_ext,
  output logic          grad_done,
  output cplx_t [U-1:0] g
);
  logic [AW-1:0]        addr_gram, addr_mf;
  cplx_t [U-1:0]        row_gram, row_mf;
  cplx_t                y_mf;
  cplx_t [U-1:0][U-1:0] g_mat;
  cplx_t [U-1:0]        m, x_mux;
  logic                 gram_done, mf_done;
  logic                 gram_pend, mf_pend, est_start;

  dn_local_mem #(.U(U), .BC(BC)) u_mem (
    .clk, .rst_n, .h_we, .h_waddr, .h_wrow, .y_we, .y_waddr, .y_wdata,
    .raddr_a(addr_gram), .hrow_a(row_gram), .raddr_b(addr_mf), .hrow_b(row_mf), .y_b(y_mf));

  dn_gram #(.U(U), .BC(BC)) u_gram (
    .clk, .rst_n, .start(start && new_channel), .raddr(addr_gram), .hrow(row_gram),
    .done(gram_done), .g(g_mat), .diag(d));

  dn_mf #(.U(U), .BC(BC)) u_mf (
    .clk, .rst_n, .start, .raddr(addr_mf), .hrow(row_mf), .y(y_mf), .done(mf_done), .m);

  // Start the initial estimate once the matched filter and, if it runs, the
  // Gram matrix have finished.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gram_pend <= 1'b0;
      mf_pend   <= 1'b0;
    end else if (start) begin
      gram_pend <= new_channel;
      mf_pend   <= 1'b1;
    end else begin
      if (gram_done) gram_pend <= 1'b0;
      if (mf_done)   mf_pend   <= 1'b0;
    end
  end

  assign est_start = mf_pend && mf_done && (!gram_pend || gram_done);

  dn_vdiv #(.U(U)) u_init (.clk, .rst_n, .start(est_start), .m, .d, .done(est_done), .x(x_c));

  assign x_mux = x_sel_local ? x_c : x_ext;

  dn_grad #(.U(U)) u_grad (
    .clk, .rst_n, .start(grad_start), .g_mat, .x(x_mux), .m, .done(grad_done), .g);
endmodule
