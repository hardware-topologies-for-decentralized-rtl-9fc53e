// dn_ring_apex - apex cluster (cluster C) of the ring topology.
//
// The apex closes the daisy chain. It does everything a ring cluster does and
// in addition evaluates the Newton step (eq. 10) and restarts the chain:
//   * at a start pulse it sends the all-zero vector (p = 0, q = 0) to cluster
//     1, which is the initial value of the interconnect variables;
//   * after receiving p and q from cluster C-1 in iteration t it adds its own
//     share: in t = 1, D = p_in + diag(D_C) (stored for the rest of the
//     symbol) and x(t-1) := x_C, its own initial estimate; in every iteration
//     q = q_in + g(x(t-1));
//   * it computes x(t) = x(t-1) - D^-1 q (dn_newton_update);
//   * for t < T it broadcasts x(t) to cluster 1 as p, with q flushed to 0;
//     for t = T it presents x(T) on x_out with x_valid high for one cycle.
// Links, buffers and handshakes are those of dn_ring_cluster. The apex
// behaviour follows the published design's ring algorithm; that the zero vector is
// sent at each symbol start to launch the chain, and that D is rebuilt in
// every symbol's first iteration, are this design's choices.
//
// The q half of every outgoing beat is constant zero (the start token and the
// flush after each broadcast), so synthesis finds those output bits constant.
// The buffers' fill counts are left open.
module dn_ring_apex
  import dn_pkg::*;
#(
  parameter int U     = U_DEF,
  parameter int BC    = BC_DEF,
  parameter int T     = T_DEF,
  parameter int DEPTH = U_DEF,
  localparam int AW = (BC > 1) ? $clog2(BC) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          h_we,
  input  logic [AW-1:0] h_waddr,
  input  cplx_t [U-1:0] h_wrow,
  input  logic          y_we,
  input  logic [AW-1:0] y_waddr,
  input  cplx_t         y_wdata,
  input  logic          start,
  input  logic          new_channel,
  output logic          busy,
  input  logic          in_valid,
  output logic          in_ready,
  input  beat_t         in_data,
  output logic          out_valid,
  input  logic          out_ready,
  output beat_t         out_data,
  output logic          x_valid,
  output cplx_t [U-1:0] x_out
);
  localparam int UW = (U > 1) ? $clog2(U) : 1;
  localparam int TW = $clog2(T + 1);

  typedef enum logic [2:0] {S_IDLE, S_TOKEN, S_RECV, S_GRAD, S_UPD, S_SEND} state_t;
  state_t state;

  logic [TW-1:0] t;
  logic [UW-1:0] idx;
  logic          est_ok, vec_full, upd_start, upd_done;
  cplx_t [U-1:0] p_in, q_in, q_tot, x_reg, x_new;
  word_t [U-1:0] d_tot;

  logic          est_done, grad_start, grad_done;
  word_t [U-1:0] d;
  cplx_t [U-1:0] x_c, g;

  dn_cluster_core #(.U(U), .BC(BC)) u_core (
    .clk, .rst_n, .h_we, .h_waddr, .h_wrow, .y_we, .y_waddr, .y_wdata,
    .start, .new_channel, .est_done, .d, .x_c,
    .grad_start, .x_sel_local(t == TW'(1)), .x_ext(x_reg), .grad_done, .g);

  logic  rx_valid, rx_ready;
  beat_t rx_data;
  dn_fifo #(.WIDTH(BEAT_W), .DEPTH(DEPTH)) u_in_buf (
    .clk, .rst_n, .in_valid, .in_ready, .in_data,
    .out_valid(rx_valid), .out_ready(rx_ready), .out_data(rx_data), .count());

  logic  tx_valid, tx_ready;
  beat_t tx_data;
  dn_fifo #(.WIDTH(BEAT_W), .DEPTH(DEPTH)) u_out_buf (
    .clk, .rst_n, .in_valid(tx_valid), .in_ready(tx_ready), .in_data(tx_data),
    .out_valid, .out_ready, .out_data, .count());

  cplx_t [U-1:0] d_vec, p_acc, q_acc;
  always_comb
    for (int u = 0; u < U; u++) d_vec[u] = '{re: d[u], im: '0};
  dn_aggregate #(.U(U), .N(2)) u_add_p (.parts({d_vec, p_in}), .sum(p_acc));
  dn_aggregate #(.U(U), .N(2)) u_add_q (.parts({g, q_in}), .sum(q_acc));

  // Newton step; x(t-1) is the apex's own estimate in the first iteration.
  dn_newton_update #(.U(U)) u_upd (
    .clk, .rst_n, .start(upd_start), .x_old((t == TW'(1)) ? x_c : x_reg),
    .q(q_tot), .d(d_tot), .done(upd_done), .x_new);

  assign rx_ready   = (state == S_RECV) && !vec_full;
  assign grad_start = (state == S_RECV) && vec_full && (t != TW'(1) || est_ok || est_done);
  assign tx_valid   = (state == S_TOKEN) || (state == S_SEND);
  assign tx_data.p  = (state == S_SEND) ? x_reg[idx] : '0;
  assign tx_data.q  = '0;
  assign busy       = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      t         <= '0;
      idx       <= '0;
      est_ok    <= 1'b0;
      vec_full  <= 1'b0;
      upd_start <= 1'b0;
      p_in      <= '0;
      q_in      <= '0;
      q_tot     <= '0;
      d_tot     <= '0;
      x_reg     <= '0;
      x_valid   <= 1'b0;
      x_out     <= '0;
    end else begin
      upd_start <= 1'b0;
      x_valid   <= 1'b0;
      if (est_done) est_ok <= 1'b1;
      case (state)
        S_IDLE: if (start) begin
          state    <= S_TOKEN;
          t        <= TW'(1);
          idx      <= '0;
          est_ok   <= 1'b0;
          vec_full <= 1'b0;
        end
        S_TOKEN: if (tx_ready) begin
          if (idx == UW'(U - 1)) begin
            idx   <= '0;
            state <= S_RECV;
          end else idx <= idx + 1'b1;
        end
        S_RECV: begin
          if (rx_ready && rx_valid) begin
            p_in[idx] <= rx_data.p;
            q_in[idx] <= rx_data.q;
            if (idx == UW'(U - 1)) begin
              idx      <= '0;
              vec_full <= 1'b1;
            end else idx <= idx + 1'b1;
          end
          if (grad_start) state <= S_GRAD;
        end
        S_GRAD: if (grad_done) begin
          q_tot <= q_acc;
          if (t == TW'(1))
            for (int u = 0; u < U; u++) d_tot[u] <= p_acc[u].re;
          upd_start <= 1'b1;
          vec_full  <= 1'b0;
          state     <= S_UPD;
        end
        S_UPD: if (upd_done) begin
          x_reg <= x_new;
          if (t == TW'(T)) begin
            x_out   <= x_new;
            x_valid <= 1'b1;
            state   <= S_IDLE;
          end else begin
            idx   <= '0;
            state <= S_SEND;
          end
        end
        S_SEND: if (tx_ready) begin
          if (idx == UW'(U - 1)) begin
            idx   <= '0;
            t     <= t + 1'b1;
            state <= S_RECV;
          end else idx <= idx + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
