// tb_dn_fifo - checks the interconnect buffer: order of words, full and empty
// flags, occupancy count and back-pressure, under random push and pop traffic
// against a queue scoreboard; a word must be readable the cycle after it is
// written.
`timescale 1ns/1ps
module tb_dn_fifo;
  localparam int WIDTH = 8, DEPTH = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [WIDTH-1:0] in_data, out_data;
  logic [2:0] count;
  int checks = 0, failures = 0, n_full = 0;
  logic [WIDTH-1:0] sb[$];
  bit refused = 0;

  dn_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  initial begin
    in_valid = 0; out_ready = 0; in_data = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++; if (out_valid || !in_ready || count != 0) begin failures++; $display("FAIL after reset"); end
    // fill-through latency: written word visible next cycle
    in_valid = 1; in_data = 8'hA5; @(negedge clk); in_valid = 0;
    checks++; if (!out_valid || out_data != 8'hA5) begin failures++; $display("FAIL first word"); end
    out_ready = 1; @(negedge clk); out_ready = 0;
    for (int i = 0; i < 400; i++) begin
      bit do_push, do_pop;
      do_push = ($urandom_range(99) < ((i / 100) % 2 ? 30 : 70));
      do_pop  = ($urandom_range(99) < ((i / 100) % 2 ? 70 : 30));
      // a word offered and refused must be offered again unchanged
      if (!refused) begin in_valid = do_push; in_data = 8'($urandom); end
      out_ready = do_pop;
      #1;
      checks++;
      if (int'(count) != sb.size() || in_ready != (sb.size() < DEPTH) || out_valid != (sb.size() > 0)) begin
        failures++; $display("FAIL flags count=%0d sb=%0d", count, sb.size());
      end
      if (!in_ready) n_full++;
      if (out_valid && out_ready) begin
        checks++;
        if (out_data != sb[0]) begin failures++; $display("FAIL data %h exp %h", out_data, sb[0]); end
        void'(sb.pop_front());
      end
      if (in_valid && in_ready) sb.push_back(in_data);
      refused = in_valid && !in_ready;
      @(negedge clk);
    end
    checks++; if (n_full == 0) begin failures++; $display("FAIL never full"); end
    $display("full (back-pressure) cycles: %0d", n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
