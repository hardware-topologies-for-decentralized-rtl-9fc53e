// dn_star_apex - apex cluster (cluster C) of the star topology.
//
// The apex has a dedicated two-way link to each of the C-1 non-apex clusters
// and collects their partial computations in parallel. In iteration t it
//   * receives p_c and q_c from every link (U beats each, all links at once,
//     each through its own INOUT buffer of two dn_fifo queues);
//   * computes its own gradient g(x(t-1)), with x(0) = x_C, its own initial
//     estimate;
//   * aggregates: q = sum_c q_c + g, and in t = 1 also D = sum_c p_c + diag(D_C),
//     kept for the rest of the symbol (dn_aggregate, N = C inputs);
//   * computes x(t) = x(t-1) - D^-1 q (dn_newton_update);
//   * for t < T broadcasts x(t) as p_c (q_c = 0, the flush) on all C-1 links,
//     one beat per element, a beat leaving only when every link can take it;
//     for t = T presents x(T) on x_out with x_valid high for one cycle.
// Link signals are packed per link: element c-1 of up_*/dn_* belongs to
// cluster c. The behaviour follows the published design's star algorithm; the beat
// format, the lock-step broadcast and the control are this design's choices.
//
// The q half of every beat sent down is constant zero (the flush), so
// synthesis finds those output bits constant. The buffers' fill counts are
// left open.
module dn_star_apex
  import dn_pkg::*;
#(
  parameter int U     = U_DEF,
  parameter int BC    = BC_DEF,
  parameter int C     = C_DEF,
  parameter int T     = T_DEF,
  parameter int DEPTH = U_DEF,
  localparam int AW = (BC > 1) ? $clog2(BC) : 1,
  localparam int L  = C - 1                  // number of links
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
  // links from the non-apex clusters (up)
  input  logic  [L-1:0] up_valid,
  output logic  [L-1:0] up_ready,
  input  beat_t [L-1:0] up_data,
  // links to the non-apex clusters (down)
  output logic  [L-1:0] dn_valid,
  input  logic  [L-1:0] dn_ready,
  output beat_t [L-1:0] dn_data,
  output logic          x_valid,
  output cplx_t [U-1:0] x_out
);
  localparam int UW = (U > 1) ? $clog2(U) : 1;
  localparam int TW = $clog2(T + 1);

  typedef enum logic [1:0] {S_IDLE, S_COLLECT, S_UPD, S_BCAST} state_t;
  state_t state;

  logic [TW-1:0]        t;
  logic [UW-1:0]        idx;
  logic [L-1:0][UW-1:0] ridx;
  logic [L-1:0]         full;
  logic                 est_ok, own_started, own_ok, upd_start, upd_done;
  cplx_t [L-1:0][U-1:0] p_in, q_in;
  cplx_t [U-1:0]        q_tot, x_reg, x_new, p_sum, q_sum, d_vec;
  word_t [U-1:0]        d_tot;

  logic          est_done, grad_start, grad_done;
  word_t [U-1:0] d;
  cplx_t [U-1:0] x_c, g;

  dn_cluster_core #(.U(U), .BC(BC)) u_core (
    .clk, .rst_n, .h_we, .h_waddr, .h_wrow, .y_we, .y_waddr, .y_wdata,
    .start, .new_channel, .est_done, .d, .x_c,
    .grad_start, .x_sel_local(t == TW'(1)), .x_ext(x_reg), .grad_done, .g);

  // INOUT buffers, one pair of queues per link
  logic  [L-1:0] rx_valid, rx_ready, tx_valid, tx_ready;
  beat_t [L-1:0] rx_data;
  beat_t         tx_data;
  logic          all_tx_ready;

  for (genvar k = 0; k < L; k++) begin : g_link
    dn_fifo #(.WIDTH(BEAT_W), .DEPTH(DEPTH)) u_up_buf (
      .clk, .rst_n, .in_valid(up_valid[k]), .in_ready(up_ready[k]), .in_data(up_data[k]),
      .out_valid(rx_valid[k]), .out_ready(rx_ready[k]), .out_data(rx_data[k]), .count());
    dn_fifo #(.WIDTH(BEAT_W), .DEPTH(DEPTH)) u_dn_buf (
      .clk, .rst_n, .in_valid(tx_valid[k]), .in_ready(tx_ready[k]), .in_data(tx_data),
      .out_valid(dn_valid[k]), .out_ready(dn_ready[k]), .out_data(dn_data[k]), .count());
    assign rx_ready[k] = (state == S_COLLECT) && !full[k];
    assign tx_valid[k] = (state == S_BCAST) && all_tx_ready;
  end

  assign all_tx_ready = &tx_ready;
  assign tx_data.p    = x_reg[idx];
  assign tx_data.q    = '0;

  // Aggregate blocks
  always_comb
    for (int u = 0; u < U; u++) d_vec[u] = '{re: d[u], im: '0};
  dn_aggregate #(.U(U), .N(C)) u_agg_p (.parts({p_in, d_vec}), .sum(p_sum));
  dn_aggregate #(.U(U), .N(C)) u_agg_q (.parts({q_in, g}), .sum(q_sum));

  dn_newton_update #(.U(U)) u_upd (
    .clk, .rst_n, .start(upd_start), .x_old((t == TW'(1)) ? x_c : x_reg),
    .q(q_tot), .d(d_tot), .done(upd_done), .x_new);

  assign grad_start = (state == S_COLLECT) && !own_started && (t != TW'(1) || est_ok || est_done);
  assign busy       = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      t           <= '0;
      idx         <= '0;
      ridx        <= '0;
      full        <= '0;
      est_ok      <= 1'b0;
      own_started <= 1'b0;
      own_ok      <= 1'b0;
      upd_start   <= 1'b0;
      p_in        <= '0;
      q_in        <= '0;
      q_tot       <= '0;
      d_tot       <= '0;
      x_reg       <= '0;
      x_valid     <= 1'b0;
      x_out       <= '0;
    end else begin
      upd_start <= 1'b0;
      x_valid   <= 1'b0;
      if (est_done) est_ok <= 1'b1;
      case (state)
        S_IDLE: if (start) begin
          state       <= S_COLLECT;
          t           <= TW'(1);
          est_ok      <= 1'b0;
          own_started <= 1'b0;
          own_ok      <= 1'b0;
          full        <= '0;
          ridx        <= '0;
        end
        S_COLLECT: begin
          for (int k = 0; k < L; k++)
            if (rx_ready[k] && rx_valid[k]) begin
              p_in[k][ridx[k]] <= rx_data[k].p;
              q_in[k][ridx[k]] <= rx_data[k].q;
              if (ridx[k] == UW'(U - 1)) begin
                ridx[k] <= '0;
                full[k] <= 1'b1;
              end else ridx[k] <= ridx[k] + 1'b1;
            end
          if (grad_start) own_started <= 1'b1;
          if (grad_done)  own_ok      <= 1'b1;
          if (&full && own_ok) begin
            q_tot <= q_sum;
            if (t == TW'(1))
              for (int u = 0; u < U; u++) d_tot[u] <= p_sum[u].re;
            upd_start <= 1'b1;
            state     <= S_UPD;
          end
        end
        S_UPD: if (upd_done) begin
          x_reg <= x_new;
          if (t == TW'(T)) begin
            x_out   <= x_new;
            x_valid <= 1'b1;
            state   <= S_IDLE;
          end else begin
            idx   <= '0;
            state <= S_BCAST;
          end
        end
        S_BCAST: if (all_tx_ready) begin
          if (idx == UW'(U - 1)) begin
            idx         <= '0;
            t           <= t + 1'b1;
            full        <= '0;
            own_started <= 1'b0;
            own_ok      <= 1'b0;
            state       <= S_COLLECT;
          end else idx <= idx + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
