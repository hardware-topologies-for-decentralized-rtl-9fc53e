// dn_local_mem - local memory of one antenna cluster.
//
// Holds the cluster's channel matrix H_c (BC antenna rows of U complex
// entries) and its received vector y_c (BC complex samples). H_c is written
// once per channel coherence interval, y_c once per received symbol, one
// antenna row (or sample) per clock through the write ports. The memory is
// partitioned by antenna row so that a whole row of U entries is read in one
// access, as the Gram matrix and matched-filter units need; two independent
// read ports let both units sweep the rows at the same time. Reads are
// asynchronous (LUT memory style); writes take effect at the clock edge. The
// contents are cleared by reset. Port structure and read timing are this
// design's choices.
module dn_local_mem
  import dn_pkg::*;
#(
  parameter int U  = U_DEF,
  parameter int BC = BC_DEF,
  localparam int AW = (BC > 1) ? $clog2(BC) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              h_we,
  input  logic [AW-1:0]     h_waddr,
  input  cplx_t [U-1:0]     h_wrow,
  input  logic              y_we,
  input  logic [AW-1:0]     y_waddr,
  input  cplx_t             y_wdata,
  input  logic [AW-1:0]     raddr_a,
  output cplx_t [U-1:0]     hrow_a,
  input  logic [AW-1:0]     raddr_b,
  output cplx_t [U-1:0]     hrow_b,
  output cplx_t             y_b
);
  cplx_t [U-1:0] h_mem [BC];
  cplx_t         y_mem [BC];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < BC; b++) begin
        h_mem[b] <= '0;
        y_mem[b] <= '0;
      end
    end else begin
      if (h_we) h_mem[h_waddr] <= h_wrow;
      if (y_we) y_mem[y_waddr] <= y_wdata;
    end
  end

  assign hrow_a = h_mem[raddr_a];
  assign hrow_b = h_mem[raddr_b];
  assign y_b    = y_mem[raddr_b];
endmodule
