// dn_mimo_top - both DN detector topologies side by side.
//
// The decentralized Newton (DN) detector estimates the U user symbols x from
// the signals y = H x + n received on B = C * BC base-station antennas that
// are split into C clusters. Each cluster keeps its part of H and y and only
// exchanges U-element vectors. This top holds the two proposed hardware
// organisations of that exchange as independent detectors with their own
// ports: N_SC ring-topology detectors (dn_ring_top, one per sub-carrier
// processed in parallel; ports ring_*, indexed by sub-carrier) and one
// star-topology detector (dn_star_top, ports star_*). The two share nothing
// but clock and reset; see dn_ring_top for the port protocol.
module dn_mimo_top
  import dn_pkg::*;
#(
  parameter int U     = U_DEF,
  parameter int BC    = BC_DEF,
  parameter int C     = C_DEF,
  parameter int T     = T_DEF,
  parameter int N_SC  = 1,
  parameter int DEPTH = U_DEF,
  localparam int AW = (BC > 1) ? $clog2(BC) : 1,
  localparam int CW = (C > 1) ? $clog2(C) : 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // ring-topology detectors, one per sub-carrier
  input  logic          [N_SC-1:0]              ring_h_we,
  input  logic          [N_SC-1:0][CW-1:0]      ring_h_cluster,
  input  logic          [N_SC-1:0][AW-1:0]      ring_h_addr,
  input  cplx_t         [N_SC-1:0][U-1:0]       ring_h_row,
  input  logic          [N_SC-1:0]              ring_y_we,
  input  logic          [N_SC-1:0][CW-1:0]      ring_y_cluster,
  input  logic          [N_SC-1:0][AW-1:0]      ring_y_addr,
  input  cplx_t         [N_SC-1:0]              ring_y_data,
  input  logic          [N_SC-1:0]              ring_start,
  input  logic          [N_SC-1:0]              ring_new_channel,
  output logic          [N_SC-1:0]              ring_ready,
  output logic          [N_SC-1:0]              ring_x_valid,
  output cplx_t         [N_SC-1:0][U-1:0]       ring_x_out,
  output logic          [N_SC-1:0][U-1:0][3:0]  ring_bits,
  // star-topology detector
  input  logic                          star_h_we,
  input  logic [CW-1:0]                 star_h_cluster,
  input  logic [AW-1:0]                 star_h_addr,
  input  cplx_t [U-1:0]                 star_h_row,
  input  logic                          star_y_we,
  input  logic [CW-1:0]                 star_y_cluster,
  input  logic [AW-1:0]                 star_y_addr,
  input  cplx_t                         star_y_data,
  input  logic                          star_start,
  input  logic                          star_new_channel,
  output logic                          star_ready,
  output logic                          star_x_valid,
  output cplx_t [U-1:0]                 star_x_out,
  output logic [U-1:0][3:0]             star_bits
);
  for (genvar s = 0; s < N_SC; s++) begin : g_ring
    dn_ring_top #(.U(U), .BC(BC), .C(C), .T(T), .DEPTH(DEPTH)) u_ring (
      .clk, .rst_n,
      .h_we(ring_h_we[s]), .h_cluster(ring_h_cluster[s]), .h_addr(ring_h_addr[s]),
      .h_row(ring_h_row[s]), .y_we(ring_y_we[s]), .y_cluster(ring_y_cluster[s]),
      .y_addr(ring_y_addr[s]), .y_data(ring_y_data[s]), .start(ring_start[s]),
      .new_channel(ring_new_channel[s]), .ready(ring_ready[s]),
      .x_valid(ring_x_valid[s]), .x_out(ring_x_out[s]), .bits(ring_bits[s]));
  end

  dn_star_top #(.U(U), .BC(BC), .C(C), .T(T), .DEPTH(DEPTH)) u_star (
    .clk, .rst_n,
    .h_we(star_h_we), .h_cluster(star_h_cluster), .h_addr(star_h_addr), .h_row(star_h_row),
    .y_we(star_y_we), .y_cluster(star_y_cluster), .y_addr(star_y_addr), .y_data(star_y_data),
    .start(star_start), .new_channel(star_new_channel), .ready(star_ready),
    .x_valid(star_x_valid), .x_out(star_x_out), .bits(star_bits));
endmodule
