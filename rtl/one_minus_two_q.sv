// one_minus_two_q: negative tanh bias, r = 1 - 2q, without a subtractor.
//
// The input is the negated doubled bias, a = -2q in [-2, -1]; r = 1 + a.
// The fractional bits pass unchanged. For a in [-2, -1) the lowest integer
// bit a0 is 0 and the integer part of r is -1 (all ones, sign included);
// for a = -1, a0 is 1 and the integer part of r is 0. Feeding the inverse
// of a0 to every integer and sign bit of r covers both cases. Combinational.
// The whole circuit is wiring plus one inverter, replacing a subtractor.
//
// Ports: a (signed, FW fractional bits, must be in [-2, -1]), r = 1 + a.
// The bit rule is the one of the published NACU; taking -2q (rather than 2q)
// as the input, the reading under which the rule is exact, and extending it
// to the sign bit are this design's choices.
module one_minus_two_q #(
  parameter int DW = nacu_pkg::DATA_W,
  parameter int FW = nacu_pkg::FRAC_W
) (
  input  logic signed [DW-1:0] a,
  output logic signed [DW-1:0] r
);

  always_comb begin
    r[FW-1:0]  = a[FW-1:0];
    r[DW-1:FW] = {(DW - FW){~a[FW]}};
  end

endmodule
