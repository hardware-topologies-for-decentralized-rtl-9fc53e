// dn_fifo - buffer for the interconnect variables p and q of one cluster link.
//
// The clusters cache the words they exchange in local buffers that work as
// first-in first-out queues; this module is such a buffer (the IN, OUT and
// INOUT buffers of the cluster diagrams). It is a synchronous FIFO of DEPTH
// entries of WIDTH bits with a valid/ready handshake on both sides: a word is
// written when in_valid and in_ready are both high at a clock edge, and read
// when out_valid and out_ready are both high. out_data shows the oldest entry
// combinationally; a word written in one cycle can be read in the next. A full
// FIFO lowers in_ready, which stalls the sender (back-pressure). Depth, width
// and handshake are this design's choices.
//
// rst_n also disables the handshake assertion, so lint tools see it used
// both as an asynchronous reset and in a clocked expression; that is intended.
module dn_fifo #(
  parameter int WIDTH = 64,
  parameter int DEPTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    rd_ptr, wr_ptr;
  logic             push, pop;

  assign in_ready  = (count != DEPTH[$clog2(DEPTH+1)-1:0]);
  assign out_valid = (count != '0);
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;
  assign out_data  = mem[rd_ptr];

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] ptr);
    return (ptr == AW'(DEPTH - 1)) ? '0 : ptr + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= inc(wr_ptr);
      if (pop)  rd_ptr <= inc(rd_ptr);
      case ({push, pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  // A sender that is held off must keep its word until it is accepted.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           in_valid && !in_ready |=> in_valid && $stable(in_data));
endmodule
