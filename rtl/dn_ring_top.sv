// dn_ring_top - DN MIMO uplink detector, ring topology, one sub-carrier.
//
// C clusters of BC antennas each form a one-way ring: clusters 1 .. C-1
// (dn_ring_cluster) and the apex cluster C (dn_ring_apex), each link carrying
// the interconnect variables p and q. In iteration t the vectors travel once
// around the ring, each cluster adding its share, and the apex performs the
// Newton step x(t) = x(t-1) - D^-1 q and sends x(t) back into the ring. The
// clusters are therefore busy one after another (sequential schedule), and
// the link traffic per iteration does not depend on C.
//
// Interface: H_c is loaded one antenna row per clock (h_we, h_cluster =
// c - 1, h_addr = antenna index inside the cluster, h_row = U entries), y_c
// one sample per clock (y_we, y_cluster, y_addr, y_data). A start pulse while
// ready is high detects one symbol; new_channel set with it recomputes the
// Gram matrices (once per coherence interval, after loading a new H). When
// done, x_valid pulses with x(T) on x_out and the 16-QAM decisions on bits.
// ready is low from start until every cluster is idle again.
module dn_ring_top
  import dn_pkg::*;
#(
  parameter int U     = U_DEF,
  parameter int BC    = BC_DEF,
  parameter int C     = C_DEF,
  parameter int T     = T_DEF,
  parameter int DEPTH = U_DEF,
  localparam int AW = (BC > 1) ? $clog2(BC) : 1,
  localparam int CW = (C > 1) ? $clog2(C) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               h_we,
  input  logic [CW-1:0]      h_cluster,
  input  logic [AW-1:0]      h_addr,
  input  cplx_t [U-1:0]      h_row,
  input  logic               y_we,
  input  logic [CW-1:0]      y_cluster,
  input  logic [AW-1:0]      y_addr,
  input  cplx_t              y_data,
  input  logic               start,
  input  logic               new_channel,
  output logic               ready,
  output logic               x_valid,
  output cplx_t [U-1:0]      x_out,
  output logic [U-1:0][3:0]  bits
);
  // link k enters cluster k (index C-1 is the apex)
  logic  [C-1:0] l_valid, l_ready;
  beat_t [C-1:0] l_data;
  logic  [C-1:0] busy;
  logic          go;

  assign go    = start && ready;
  assign ready = ~|busy;

  for (genvar c = 0; c < C - 1; c++) begin : g_cluster
    dn_ring_cluster #(.U(U), .BC(BC), .T(T), .DEPTH(DEPTH)) u_cluster (
      .clk, .rst_n,
      .h_we(h_we && h_cluster == CW'(c)), .h_waddr(h_addr), .h_wrow(h_row),
      .y_we(y_we && y_cluster == CW'(c)), .y_waddr(y_addr), .y_wdata(y_data),
      .start(go), .new_channel, .busy(busy[c]),
      .in_valid(l_valid[c]), .in_ready(l_ready[c]), .in_data(l_data[c]),
      .out_valid(l_valid[c+1]), .out_ready(l_ready[c+1]), .out_data(l_data[c+1]));
  end

  dn_ring_apex #(.U(U), .BC(BC), .T(T), .DEPTH(DEPTH)) u_apex (
    .clk, .rst_n,
    .h_we(h_we && h_cluster == CW'(C - 1)), .h_waddr(h_addr), .h_wrow(h_row),
    .y_we(y_we && y_cluster == CW'(C - 1)), .y_waddr(y_addr), .y_wdata(y_data),
    .start(go), .new_channel, .busy(busy[C-1]),
    .in_valid(l_valid[C-1]), .in_ready(l_ready[C-1]), .in_data(l_data[C-1]),
    .out_valid(l_valid[0]), .out_ready(l_ready[0]), .out_data(l_data[0]),
    .x_valid, .x_out);

  dn_qam_decoder #(.U(U)) u_qam (.x(x_out), .bits);
endmodule
