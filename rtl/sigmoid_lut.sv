// sigmoid_lut: piecewise-linear coefficient table for sigma(x), x >= 0.
//
// Given the magnitude of the (possibly doubled) input, the table returns the
// slope m and bias q of the linear segment that contains it, so that
// sigma(mag) ~ m*mag + q. The segment index is the integer part of
// mag / h (h = 2^-SEG_FRAC); indices past the last fitted segment select
// the final entry, which holds the saturated line m = 0, q = 1.
// The table contents are computed at elaboration by nacu_pkg::pwl_coef;
// see nacu_pkg for the formula. Purely combinational (a ROM).
//
// Ports
//   mag    unsigned magnitude, FRAC_W fractional bits; one bit wider than a
//          signed operand so that 2|x| (used for tanh) never overflows
//   m, q   signed slope and bias, FRAC_W fractional bits; q is in [0.5, 1]
module sigmoid_lut
  import nacu_pkg::*;
#(
  parameter int DW      = nacu_pkg::DATA_W,
  parameter int FW      = nacu_pkg::FRAC_W,
  parameter int ENTRIES = nacu_pkg::LUT_ENTRIES,
  parameter int SEGF    = nacu_pkg::SEG_FRAC
) (
  input  logic [DW-1:0]        mag,
  output logic signed [DW-1:0] m,
  output logic signed [DW-1:0] q
);

  localparam int IDX_W  = $clog2(ENTRIES);
  localparam int SHIFT  = FW - SEGF;
  localparam int SEG_W  = DW - SHIFT;     // bits of mag above the segment offset

  typedef logic signed [DW-1:0] word_t;
  typedef word_t table_t [ENTRIES];

  function automatic table_t build(bit want_bias);
    table_t t;
    for (int i = 0; i < ENTRIES; i++)
      t[i] = word_t'(pwl_coef(i, ENTRIES, SEGF, FW, want_bias));
    return t;
  endfunction

  localparam table_t M_TABLE = build(1'b0);
  localparam table_t Q_TABLE = build(1'b1);

  logic [SEG_W-1:0] seg;
  logic [IDX_W-1:0] idx;

  always_comb begin
    seg = mag[DW-1:SHIFT];
    if (int'(seg) >= ENTRIES - 1) idx = IDX_W'(ENTRIES - 1);
    else                          idx = IDX_W'(seg);
    m = M_TABLE[idx];
    q = Q_TABLE[idx];
  end

endmodule
