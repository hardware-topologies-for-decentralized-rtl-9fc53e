// tb_dn_qam_decoder - 16-QAM decisions for the constellation points, the
// values on and next to every threshold and random values, compared with a
// decision table written here (levels +-0.25, +-0.75; Gray labels).
`timescale 1ns/1ps
module tb_dn_qam_decoder;
  import dn_pkg::*;
  localparam int U = 2;
  cplx_t [U-1:0] x;
  logic [U-1:0][3:0] bits;
  int checks = 0, failures = 0;

  dn_qam_decoder #(.U(U)) dut (.*);

  function automatic logic [1:0] expect_bits(int v);
    // thresholds at -0.5, 0, +0.5 (Q4.12: -2048, 0, 2048)
    if (v <= -2049) return 2'b00;
    if (v <= -1)    return 2'b01;
    if (v <= 2047)  return 2'b11;
    return 2'b10;
  endfunction

  initial begin
    int vals[$] = '{-3072, -1024, 1024, 3072, -2049, -2048, -2047, -1, 0, 1, 2047, 2048, 2049,
                    -32768, 32767};
    for (int i = 0; i < 300; i++) vals.push_back(int'($urandom_range(20000)) - 10000);
    for (int i = 0; i < vals.size(); i++) begin
      x[0].re = 16'(vals[i]);
      x[0].im = 16'(vals[(i + 3) % vals.size()]);
      x[1].re = 16'(vals[(i + 7) % vals.size()]);
      x[1].im = 16'(vals[i]);
      #1;
      for (int u = 0; u < U; u++) begin
        checks++;
        if (bits[u] != {expect_bits(int'(x[u].re)), expect_bits(int'(x[u].im))}) begin
          failures++; $display("FAIL (%0d,%0d) -> %b", x[u].re, x[u].im, bits[u]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
