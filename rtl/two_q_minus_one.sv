// two_q_minus_one: r = a - 1 for a in [1, 2] without a subtractor.
//
// Used for the positive tanh bias (a = 2q, r = 2q - 1) and, because the
// reciprocal 1/sigma(-x) of the exponential path lies in the same interval
// [1, 2], also as the decrementor after the divider.
// The fractional bits pass unchanged. For a in [1, 2) the two lowest integer
// bits are 01 and become 00; for a = 2 they are 10 and become 01. Both cases
// are covered by moving integer bit 1 to integer bit 0 and clearing all
// higher bits. Combinational.
// The result is produced by wiring alone, with no gates: that is the purpose
// of the construction.
//
// Ports: a (signed, FW fractional bits, must be in [1, 2]), r = a - 1.
// The bit rule is the one of the published NACU; using the same circuit as
// the decrementor of the exponential path is this design's reading.
module two_q_minus_one #(
  parameter int DW = nacu_pkg::DATA_W,
  parameter int FW = nacu_pkg::FRAC_W
) (
  input  logic signed [DW-1:0] a,
  output logic signed [DW-1:0] r
);

  always_comb begin
    r = '0;
    r[FW-1:0] = a[FW-1:0];
    r[FW]     = a[FW+1];
  end

endmodule
