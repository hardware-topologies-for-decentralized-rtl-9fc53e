// tb_dn_workloads - the evaluated configurations other than the default one,
// each run end to end on dn_mimo_top by one tb_dn_workload_run instance:
//   two_subcarriers  B = 128, C = 4, U = 8, T = 3, two ring sub-carriers
//   b64_t4           B = 64,  C = 2, U = 8, T = 4
//   u2               B = 128, C = 4, U = 2, T = 3
//   u6_b64           B = 64,  C = 2, U = 6, T = 3
// All share one clock and reset and run at the same time. Each checks its
// results bit-exactly against the reference models and its latency for
// consistency (see tb_dn_workload_run). The two parallel ring sub-carriers
// must both finish, and at the same cycle. The run ends when every instance
// has finished, or when the watchdog fires.
`timescale 1ns/1ps
module tb_dn_workloads;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int NW = 4;
  logic [NW-1:0] fin;
  int ch[NW], fl[NW];

  tb_dn_workload_run #(.U(8), .BC(32), .C(4), .T(3), .N_SC(2), .NAME("two_subcarriers"))
    w0 (.clk, .rst_n, .fin(fin[0]), .checks(ch[0]), .failures(fl[0]));
  tb_dn_workload_run #(.U(8), .BC(32), .C(2), .T(4), .N_SC(1), .NAME("b64_t4"))
    w1 (.clk, .rst_n, .fin(fin[1]), .checks(ch[1]), .failures(fl[1]));
  tb_dn_workload_run #(.U(2), .BC(32), .C(4), .T(3), .N_SC(1), .NAME("u2"))
    w2 (.clk, .rst_n, .fin(fin[2]), .checks(ch[2]), .failures(fl[2]));
  tb_dn_workload_run #(.U(6), .BC(32), .C(2), .T(3), .N_SC(1), .NAME("u6_b64"))
    w3 (.clk, .rst_n, .fin(fin[3]), .checks(ch[3]), .failures(fl[3]));

  function automatic void report(int extra_fail);
    int checks, failures;
    checks = 0; failures = extra_fail;
    for (int i = 0; i < NW; i++) begin checks += ch[i]; failures += fl[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (&fin);
    report(0);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    $display("FAIL watchdog, finished: %b", fin);
    report(1);
    $finish;
  end
endmodule
