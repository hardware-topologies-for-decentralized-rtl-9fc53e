// dn_star_cluster - non-apex cluster of the star topology.
//
// Each non-apex cluster of the star has one two-way link to the apex. It
// sends its partial computations up and receives the broadcast estimate down:
//   t = 1:  up p_c = diag(D_c), q_c = g(x_c)   (x_c: own initial estimate)
//   t > 1:  receive p_c = x(t-1) from the apex, then up q_c = g(x(t-1)), p_c = 0
// with g(x) = H_c^H H_c x - H_c^H y_c from dn_cluster_core. Both directions
// carry one (p, q) element pair per beat, U beats per vector, with a
// valid/ready handshake; the two FIFOs (dn_fifo) together form the cluster's
// INOUT buffer. A start pulse begins a symbol; the first vector goes up as
// soon as the initial estimate and gradient are ready, without waiting for
// the apex. busy stays high until the T-th vector has been handed to the up
// buffer. The data flow follows the published design; the beat format, the zero sent
// in p for t > 1 and the control are this design's choices.
//
// The core's initial estimate x_c is not used here (the core's multiplexer
// applies it), and the q half of beats from the apex is ignored because the
// apex always sends it as zero. The buffers' fill counts are left open.
module dn_star_cluster
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
  // link from the apex (down)
  input  logic          dn_valid,
  output logic          dn_ready,
  input  beat_t         dn_data,
  // link to the apex (up)
  output logic          up_valid,
  input  logic          up_ready,
  output beat_t         up_data
);
  localparam int UW = (U > 1) ? $clog2(U) : 1;
  localparam int TW = $clog2(T + 1);

  typedef enum logic [2:0] {S_IDLE, S_WAIT_EST, S_RECV, S_GRAD, S_SEND} state_t;
  state_t state;

  logic [TW-1:0] t;
  logic [UW-1:0] idx;
  logic          vec_full;
  cplx_t [U-1:0] x_in;

  logic          est_done, grad_start, grad_done;
  word_t [U-1:0] d;
  cplx_t [U-1:0] x_c, g;

  dn_cluster_core #(.U(U), .BC(BC)) u_core (
    .clk, .rst_n, .h_we, .h_waddr, .h_wrow, .y_we, .y_waddr, .y_wdata,
    .start, .new_channel, .est_done, .d, .x_c,
    .grad_start, .x_sel_local(t == TW'(1)), .x_ext(x_in), .grad_done, .g);

  logic  rx_valid, rx_ready;
  beat_t rx_data;
  dn_fifo #(.WIDTH(BEAT_W), .DEPTH(DEPTH)) u_dn_buf (
    .clk, .rst_n, .in_valid(dn_valid), .in_ready(dn_ready), .in_data(dn_data),
    .out_valid(rx_valid), .out_ready(rx_ready), .out_data(rx_data), .count());

  logic  tx_valid, tx_ready;
  beat_t tx_data;
  dn_fifo #(.WIDTH(BEAT_W), .DEPTH(DEPTH)) u_up_buf (
    .clk, .rst_n, .in_valid(tx_valid), .in_ready(tx_ready), .in_data(tx_data),
    .out_valid(up_valid), .out_ready(up_ready), .out_data(up_data), .count());

  assign rx_ready   = (state == S_RECV) && !vec_full;
  assign grad_start = ((state == S_WAIT_EST) && est_done) || ((state == S_RECV) && vec_full);
  assign tx_valid   = (state == S_SEND);
  assign tx_data.p  = (t == TW'(1)) ? cplx_t'{re: d[idx], im: '0} : '0;
  assign tx_data.q  = g[idx];
  assign busy       = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      t        <= '0;
      idx      <= '0;
      vec_full <= 1'b0;
      x_in     <= '0;
    end else begin
      case (state)
        S_IDLE: if (start) begin
          state    <= S_WAIT_EST;
          t        <= TW'(1);
          idx      <= '0;
          vec_full <= 1'b0;
        end
        S_WAIT_EST: if (grad_start) state <= S_GRAD;
        S_RECV: begin
          if (rx_ready && rx_valid) begin
            x_in[idx] <= rx_data.p;
            if (idx == UW'(U - 1)) begin
              idx      <= '0;
              vec_full <= 1'b1;
            end else idx <= idx + 1'b1;
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
          end else idx <= idx + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
