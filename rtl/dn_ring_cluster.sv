// dn_ring_cluster - non-apex cluster of the ring topology.
//
// Clusters of the ring form a one-way daisy chain. Each receives the
// interconnect variables p and q (U complex entries each) from its
// predecessor, adds its local share, and passes them to its successor:
//   first iteration (t = 1):  p_out = p_in + diag(D_c),  q_out = q_in + g(x_c)
//   later iterations:         p_out = p_in (= x(t-1)),   q_out = q_in + g(p_in)
// where g(x) = H_c^H H_c x - H_c^H y_c comes from dn_cluster_core.
//
// Links carry one (p, q) element pair per beat with a valid/ready handshake,
// U beats per vector, element 0 first. The incoming vector lands in the IN
// buffer, the outgoing one leaves through the OUT buffer (dn_fifo, DEPTH
// entries each). Per symbol: a start pulse launches the matched filter (and
// the Gram matrix when new_channel is set); then for t = 1..T the cluster
// collects a full vector, computes its gradient (U + 1 cycles; in t = 1 it
// also waits for its initial estimate) and sends the updated vector. busy is
// high from start until the T-th vector has been handed to the OUT buffer.
// The data flow follows the published design; beat format, buffering and control are
// this design's choices.
//
// The core's initial estimate x_c is not used here: the core's own
// multiplexer applies it in the first iteration. The buffers' fill counts are
// left open because the handshake alone controls the flow.
module dn_ring_cluster
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
  // link from the predecessor
  input  logic          in_valid,
  output logic          in_ready,
  input  beat_t         in_data,
  // link to the successor
  output logic          out_valid,
  input  logic          out_ready,
  output beat_t         out_data
);
  localparam int UW = (U > 1) ? $clog2(U) : 1;
  localparam int TW = $clog2(T + 1);

  typedef enum logic [1:0] {S_IDLE, S_RECV, S_GRAD, S_SEND} state_t;
  state_t state;

  logic [TW-1:0] t;
  logic [UW-1:0] idx;
  logic          est_ok;
  logic          vec_full;   // a whole input vector has been collected
  cplx_t [U-1:0] p_in, q_in;

  // core
  logic          est_done, grad_start, grad_done;
  word_t [U-1:0] d;
  cplx_t [U-1:0] x_c, g;

  dn_cluster_core #(.U(U), .BC(BC)) u_core (
    .clk, .rst_n, .h_we, .h_waddr, .h_wrow, .y_we, .y_waddr, .y_wdata,
    .start, .new_channel, .est_done, .d, .x_c,
    .grad_start, .x_sel_local(t == TW'(1)), .x_ext(p_in), .grad_done, .g);

  // IN buffer
  logic  rx_valid, rx_ready;
  beat_t rx_data;
  dn_fifo #(.WIDTH(BEAT_W), .DEPTH(DEPTH)) u_in_buf (
    .clk, .rst_n, .in_valid, .in_ready, .in_data,
    .out_valid(rx_valid), .out_ready(rx_ready), .out_data(rx_data), .count());

  // OUT buffer
  logic  tx_valid, tx_ready;
  beat_t tx_data;
  dn_fifo #(.WIDTH(BEAT_W), .DEPTH(DEPTH)) u_out_buf (
    .clk, .rst_n, .in_valid(tx_valid), .in_ready(tx_ready), .in_data(tx_data),
    .out_valid, .out_ready, .out_data, .count());

  // accumulators (+) of the ring cluster
  cplx_t [U-1:0] d_vec, p_acc, q_acc;
  always_comb
    for (int u = 0; u < U; u++) d_vec[u] = '{re: d[u], im: '0};
  dn_aggregate #(.U(U), .N(2)) u_add_p (.parts({d_vec, p_in}), .sum(p_acc));
  dn_aggregate #(.U(U), .N(2)) u_add_q (.parts({g, q_in}), .sum(q_acc));

  assign rx_ready   = (state == S_RECV) && !vec_full;
  assign tx_valid   = (state == S_SEND);
  assign tx_data.p  = (t == TW'(1)) ? p_acc[idx] : p_in[idx];
  assign tx_data.q  = q_acc[idx];
  assign grad_start = (state == S_RECV) && vec_full && (t != TW'(1) || est_ok || est_done);
  assign busy       = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      t        <= '0;
      idx      <= '0;
      est_ok   <= 1'b0;
      vec_full <= 1'b0;
      p_in     <= '0;
      q_in     <= '0;
    end else begin
      if (est_done) est_ok <= 1'b1;
      case (state)
        S_IDLE: if (start) begin
          state    <= S_RECV;
          t        <= TW'(1);
          idx      <= '0;
          est_ok   <= 1'b0;
          vec_full <= 1'b0;
        end
        S_RECV: begin
          if (!vec_full && rx_valid) begin
            p_in[idx] <= rx_data.p;
            q_in[idx] <= rx_data.q;
            if (idx == UW'(U - 1)) begin
              idx      <= '0;
              vec_full <= 1'b1;
            end else begin
              idx <= idx + 1'b1;
            end
          end
          if (grad_start) state <= S_GRAD;
        end
        S_GRAD: if (grad_done) begin
          state    <= S_SEND;
          idx      <= '0;
          vec_full <= 1'b0;
        end
        S_SEND: if (tx_ready) begin
          if (idx == UW'(U - 1)) begin
            idx <= '0;
            if (t == TW'(T)) state <= S_IDLE;
            else begin
              t     <= t + 1'b1;
              state <= S_RECV;
            end
          end else begin
            idx <= idx + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
