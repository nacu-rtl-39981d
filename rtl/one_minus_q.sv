// one_minus_q: bias of the negative sigmoid range, r = 1 - q, q in [0.5, 1].
//
// Because q lies in [0.5, 1], 1 - q lies in [0, 0.5]: the sign and integer
// bits of r are all zero and its fraction is the two's complement of the
// fraction of q, taken within the FW fractional bits. For q = 1 the fraction
// of q is zero, its two's complement is zero too, and r = 0 as required, so
// no subtractor over the full word is needed. Combinational.
//
// Ports: q (signed, FW fractional bits, must be in [0.5, 1]), r = 1 - q.
// The bit rule is the one of the published NACU; clearing the sign bit
// together with the integer bits is this design's choice.
module one_minus_q #(
  parameter int DW = nacu_pkg::DATA_W,
  parameter int FW = nacu_pkg::FRAC_W
) (
  input  logic signed [DW-1:0] q,
  output logic signed [DW-1:0] r
);

  logic [FW-1:0] frac_neg;

  always_comb begin
    frac_neg = ~q[FW-1:0] + FW'(1);
    r = {{(DW - FW){1'b0}}, frac_neg};
  end

endmodule
