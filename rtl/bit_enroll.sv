// bit_enroll: turns one pair of calibrated ring counts into a helper-data bit
// and a response bit, using two symmetric thresholds instead of error
// correction.
//
// The calibrated difference rocd = roc_a - roc_b is compared with +/-THRESH.
// Inside the band (|rocd| <= THRESH) the pair is weak: a small change in
// temperature or noise could flip it, so helper=0 and the pair is not used.
// Outside the band the pair is strong: helper=1 and bit = (rocd > 0). For
// weak pairs bit is 0. n_strong counts the strong pairs since clr, i.e. the
// length of the strong bitstring. Values are signed fixed point with FRAC
// fraction bits; THRESH=2.0 is the reference threshold. Whether a difference
// exactly on a threshold is weak is not specified by the reference; here it
// is weak.
//
// Interface: clk, rst (sync), clr (clears n_strong), in_valid with roc_a and
// roc_b in; out_valid, helper, bit_out and n_strong out one cycle later.
`timescale 1ps/1ps
module bit_enroll #(
  parameter int unsigned IN_W    = 16,
  parameter int unsigned FRAC    = 4,
  parameter real         THRESH  = 2.0,
  parameter int unsigned CNT_W   = 12
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   clr,
  input  logic                   in_valid,
  input  logic signed [IN_W-1:0] roc_a,
  input  logic signed [IN_W-1:0] roc_b,
  output logic                   out_valid,
  output logic                   helper,
  output logic                   bit_out,
  output logic [CNT_W-1:0]       n_strong
);
  localparam logic signed [IN_W:0] TH = (IN_W+1)'(longint'(THRESH * real'(1 << FRAC)));

  logic signed [IN_W:0] rocd;
  logic                 is_strong;

  assign rocd   = (IN_W+1)'(roc_a) - (IN_W+1)'(roc_b);
  assign is_strong = (rocd > TH) || (rocd < -TH);

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      helper    <= 1'b0;
      bit_out   <= 1'b0;
      n_strong  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        helper  <= is_strong;
        bit_out <= is_strong && (rocd > 0);
      end
      if (clr)                    n_strong <= '0;
      else if (in_valid && is_strong) n_strong <= n_strong + 1'b1;
    end
  end
endmodule
