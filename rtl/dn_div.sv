// dn_div - sequential fixed-point divider: q = (num / den), both Q4.12.
//
// Computes (num * 2^FRAC) / den with num a signed 16-bit component and den a
// positive 16-bit component, truncating toward zero and saturating the
// quotient to 16 bits. It is a restoring radix-2 divider on the magnitude of
// the numerator: one quotient bit per clock, NB = W + FRAC = 28 cycles, then
// the sign is applied. done pulses one cycle after the last bit, i.e. NB + 1
// cycles after start; q holds until the next start. A zero or negative
// divisor gives the largest magnitude with the numerator's sign. The divider
// structure is this design's choice; the published design asks only for dedicated
// division logic per user.
//
// The top quotient bit is never read: a quotient that needs it is already
// out of the 16-bit range and saturates on the bits below.
module dn_div
  import dn_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  word_t num,
  input  word_t den,
  output logic  done,
  output word_t q
);
  localparam int NB = W + FRAC;

  logic [NB-1:0]       dividend;   // magnitude bits still to shift in
  logic [NB-1:0]       quot;
  logic [W:0]          rem;
  logic [W-1:0]        divisor;
  logic                neg, busy, bad_den;
  logic [$clog2(NB+1)-1:0] cnt;

  logic [W+1:0] rem_sh;
  assign rem_sh = {rem, dividend[NB-1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dividend <= '0;
      quot     <= '0;
      rem      <= '0;
      divisor  <= '0;
      neg      <= 1'b0;
      busy     <= 1'b0;
      bad_den  <= 1'b0;
      cnt      <= '0;
      done     <= 1'b0;
      q        <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        logic [W:0] mag;
        mag      = num[W-1] ? (W+1)'(-$signed({num[W-1], num})) : (W+1)'({1'b0, num});
        dividend <= NB'(mag) << FRAC;
        neg      <= num[W-1];
        divisor  <= den;
        bad_den  <= (den[W-1] == 1'b1) || (den == '0);
        quot     <= '0;
        rem      <= '0;
        cnt      <= NB[$clog2(NB+1)-1:0];
        busy     <= 1'b1;
      end else if (busy) begin
        if (rem_sh >= {2'b00, divisor}) begin
          rem  <= (W+1)'(rem_sh - {2'b00, divisor});
          quot <= {quot[NB-2:0], 1'b1};
        end else begin
          rem  <= rem_sh[W:0];
          quot <= {quot[NB-2:0], 1'b0};
        end
        dividend <= dividend << 1;
        cnt      <= cnt - 1'b1;
        if (cnt == 1) begin
          logic [NB-1:0] qf;
          qf   = (rem_sh >= {2'b00, divisor}) ? {quot[NB-2:0], 1'b1} : {quot[NB-2:0], 1'b0};
          busy <= 1'b0;
          done <= 1'b1;
          if (bad_den)  q <= neg ? WORD_MIN : WORD_MAX;
          else if (neg) q <= sat(-acc_t'(qf));
          else          q <= sat(acc_t'(qf));
        end
      end
    end
  end
endmodule
