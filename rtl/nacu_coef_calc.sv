// nacu_coef_calc: coefficient and bias for the selected function and sign.
//
// The sigmoid table holds slope m and bias q for x >= 0 only. The other
// three cases are derived from that single entry:
//   sigma, x >= 0 (and e^x)      coef = m      bias = q
//   sigma, x <  0                coef = -m     bias = 1 - q   (one_minus_q)
//   tanh,  x >= 0                coef = 4m     bias = 2q - 1  (two_q_minus_one)
//   tanh,  x <  0                coef = -4m    bias = 1 - 2q  (one_minus_two_q)
// The coefficients multiply the magnitude |x| (output mag), which is what
// makes the negated slopes above correct. For tanh the table is addressed
// with 2|x| (tanh(x) = 2 sigma(2x) - 1), so m and q belong to the segment of
// 2|x| while the product is formed with |x| and the slope scaled by 4.
// For the exponential the input is the normalised x - x_max <= 0 and the
// positive-range line on |x| gives sigma(-x), the first term of
// e^x = 1/sigma(-x) - 1. Other operations take the x >= 0 sigmoid pair,
// which the datapath then ignores.
// Negative slopes and -2q are two's complements; the most negative input
// has its magnitude saturated to the largest positive value.
// Combinational. The four coefficient/bias pairs and the single table are
// the published NACU's; multiplying by |x| and addressing the table with
// 2|x| for tanh are this design's reading of how they are applied.
module nacu_coef_calc
  import nacu_pkg::*;
#(
  parameter int DW = nacu_pkg::DATA_W,
  parameter int FW      = nacu_pkg::FRAC_W,
  parameter int ENTRIES = nacu_pkg::LUT_ENTRIES,
  parameter int SEGF    = nacu_pkg::SEG_FRAC
) (
  input  op_e                  op,
  input  logic signed [DW-1:0] x,
  output logic signed [DW-1:0] coef,
  output logic signed [DW-1:0] bias,
  output logic signed [DW-1:0] mag
);

  localparam logic signed [DW-1:0] MAX_POS = {1'b0, {(DW - 1){1'b1}}};

  logic                 neg;
  logic [DW-1:0]        lut_addr;
  logic signed [DW-1:0] m, q;
  logic signed [DW-1:0] q2, q2_neg, m4;
  logic signed [DW-1:0] r_sig_neg, r_tanh_pos, r_tanh_neg;

  always_comb begin
    neg = x[DW-1];
    if (!neg)                   mag = x;
    else if (x == {1'b1, {(DW - 1){1'b0}}}) mag = MAX_POS;
    else                        mag = -x;
    lut_addr = (op == OP_TANH) ? {mag[DW-2:0], 1'b0} : mag;
  end

  sigmoid_lut #(.DW(DW), .FW(FW), .ENTRIES(ENTRIES), .SEGF(SEGF)) u_lut (.mag(lut_addr), .m(m), .q(q));

  assign q2     = q <<< 1;
  assign q2_neg = -q2;
  assign m4     = m <<< 2;

  one_minus_q     #(.DW(DW), .FW(FW)) u_sig_neg  (.q(q),      .r(r_sig_neg));
  two_q_minus_one #(.DW(DW), .FW(FW)) u_tanh_pos (.a(q2),     .r(r_tanh_pos));
  one_minus_two_q #(.DW(DW), .FW(FW)) u_tanh_neg (.a(q2_neg), .r(r_tanh_neg));

  always_comb begin
    coef = m;
    bias = q;
    unique case (op)
      OP_SIGMOID: if (neg) begin coef = -m;  bias = r_sig_neg;  end
      OP_TANH:    if (neg) begin coef = -m4; bias = r_tanh_neg; end
                  else     begin coef = m4;  bias = r_tanh_pos; end
      default: ;
    endcase
  end

endmodule
