// tb_dn_local_mem - writes random channel rows and received samples into the
// local memory and reads them back through both read ports, including a
// rewrite of some rows, comparing with a copy kept here.
`timescale 1ns/1ps
module tb_dn_local_mem;
  import dn_pkg::*;
  localparam int U = 3, BC = 6, AW = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic h_we, y_we;
  logic [AW-1:0] h_waddr, y_waddr, raddr_a, raddr_b;
  cplx_t [U-1:0] h_wrow, hrow_a, hrow_b;
  cplx_t y_wdata, y_b;
  cplx_t [U-1:0] hs [BC];
  cplx_t ys [BC];
  int checks = 0, failures = 0;

  dn_local_mem #(.U(U), .BC(BC)) dut (.*);

  task automatic readback();
    for (int a = 0; a < BC; a++) begin
      raddr_a = AW'(a); raddr_b = AW'(BC - 1 - a); #1;
      checks += 3;
      if (hrow_a != hs[a]) begin failures++; $display("FAIL port a row %0d", a); end
      if (hrow_b != hs[BC-1-a]) begin failures++; $display("FAIL port b row %0d", BC-1-a); end
      if (y_b != ys[BC-1-a]) begin failures++; $display("FAIL y %0d", BC-1-a); end
    end
  endtask

  initial begin
    h_we = 0; y_we = 0; h_waddr = 0; y_waddr = 0; raddr_a = 0; raddr_b = 0; h_wrow = '0; y_wdata = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      for (int b = 0; b < BC; b++) begin
        if (pass == 1 && b % 2 == 0) continue;
        @(negedge clk);
        h_we = 1; h_waddr = AW'(b); y_we = (pass == 0); y_waddr = AW'(b);
        for (int u = 0; u < U; u++) h_wrow[u] = cplx_t'($urandom);
        y_wdata = cplx_t'($urandom);
        hs[b] = h_wrow; if (pass == 0) ys[b] = y_wdata;
      end
      @(negedge clk); h_we = 0; y_we = 0;
      readback();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
