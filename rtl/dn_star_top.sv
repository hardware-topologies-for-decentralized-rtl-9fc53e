// dn_star_top - DN MIMO uplink detector, star topology, one sub-carrier.
//
// C clusters of BC antennas: clusters 1 .. C-1 (dn_star_cluster) each have a
// two-way link to the apex cluster C (dn_star_apex). In every iteration all
// non-apex clusters compute their partial gradients at the same time and send
// them up; the apex sums them with its own, performs the Newton step
// x(t) = x(t-1) - D^-1 q and broadcasts x(t) back down. Latency therefore
// hardly grows with C, while the apex's link traffic grows with C.
//
// Interface and timing of the load ports, start/new_channel, ready, x_valid,
// x_out and bits are the same as for dn_ring_top.
module dn_star_top
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
  logic  [C-2:0] up_valid, up_ready, dn_valid, dn_ready;
  beat_t [C-2:0] up_data, dn_data;
  logic  [C-1:0] busy;
  logic          go;

  assign go    = start && ready;
  assign ready = ~|busy;

  for (genvar c = 0; c < C - 1; c++) begin : g_cluster
    dn_star_cluster #(.U(U), .BC(BC), .T(T), .DEPTH(DEPTH)) u_cluster (
      .clk, .rst_n,
      .h_we(h_we && h_cluster == CW'(c)), .h_waddr(h_addr), .h_wrow(h_row),
      .y_we(y_we && y_cluster == CW'(c)), .y_waddr(y_addr), .y_wdata(y_data),
      .start(go), .new_channel, .busy(busy[c]),
      .dn_valid(dn_valid[c]), .dn_ready(dn_ready[c]), .dn_data(dn_data[c]),
      .up_valid(up_valid[c]), .up_ready(up_ready[c]), .up_data(up_data[c]));
  end

  dn_star_apex #(.U(U), .BC(BC), .C(C), .T(T), .DEPTH(DEPTH)) u_apex (
    .clk, .rst_n,
    .h_we(h_we && h_cluster == CW'(C - 1)), .h_waddr(h_addr), .h_wrow(h_row),
    .y_we(y_we && y_cluster == CW'(C - 1)), .y_waddr(y_addr), .y_wdata(y_data),
    .start(go), .new_channel, .busy(busy[C-1]),
    .up_valid, .up_ready, .up_data, .dn_valid, .dn_ready, .dn_data,
    .x_valid, .x_out);

  dn_qam_decoder #(.U(U)) u_qam (.x(x_out), .bits);
endmodule
