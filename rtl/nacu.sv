// nacu: reconfigurable non-linear arithmetic unit.
//
// One datapath computes the sigmoid, the hyperbolic tangent, the exponential
// of a normalised input, the division step of softmax, and plain
// multiply-accumulate. A single piecewise-linear sigmoid table for x >= 0
// supplies slope and bias; cheap bit-level units derive the lines for
// x < 0 and for tanh (tanh(x) = 2 sigma(2x) - 1), and one multiply-add
// evaluates the line. The exponential uses e^x = 1/sigma(-x) - 1: the
// sigmoid result is sent through a pipelined divider and a decrementor.
// Softmax is a sequence the issuing fabric runs on this unit:
//   1. OP_EXP      e_j = e^(x_j - x_max) for every j (inputs <= 0)
//   2. OP_MAC      sum = sum_j e_j * 1.0   (acc_clr on the first term)
//   3. OP_SOFTMAX  sm_i = e_i / sum        (x0 = e_i, sm_in = sum)
//
// Pipeline (one operation may be issued every cycle):
//   cycle t    operands; table lookup and coefficient derivation
//   t+1        registered coefficient, bias, operands
//   t+2        registered product
//   t+3        mac_out: result of OP_SIGMOID, OP_TANH, OP_MAC
//   t+4..t+7   divider stages (OP_EXP, OP_SOFTMAX)
//   t+8        decremented / plain quotient: result of OP_EXP, OP_SOFTMAX
// The latencies 3 (sigma, tanh) and 8 (e) are the ones the unit was
// reported with; the stage split, the softmax latency (also 8) and the
// interface are this design's own choices.
//
// Interface: in_valid, op, acc_clr, x0, x1, sm_in are sampled together.
// out_valid / out_op / out_data carry one result per cycle. mac_out is the
// shared result/accumulator register: any OP_SIGMOID, OP_TANH or OP_EXP
// overwrites it, so an accumulation must not be interleaved with them.
// The issuer must not start a 3-cycle operation exactly 5 cycles after an
// 8-cycle one (both would finish together); an assertion checks this.
// All numbers are signed Q4.11 by default. Reset is synchronous, active low.
module nacu
  import nacu_pkg::*;
#(
  parameter int DW         = nacu_pkg::DATA_W,
  parameter int FW         = nacu_pkg::FRAC_W,
  parameter int DIV_STAGES = 4,
  parameter int ENTRIES    = nacu_pkg::LUT_ENTRIES,
  parameter int SEGF       = nacu_pkg::SEG_FRAC
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  op_e                  op,
  input  logic                 acc_clr,
  input  logic signed [DW-1:0] x0,
  input  logic signed [DW-1:0] x1,
  input  logic signed [DW-1:0] sm_in,
  output logic                 out_valid,
  output op_e                  out_op,
  output logic signed [DW-1:0] out_data,
  output logic signed [DW-1:0] mac_out
);

  localparam logic signed [DW-1:0] ONE = DW'(1) << FW;

  initial begin
    assert (format_saturates(DW, FW))
      else $error("nacu: Q%0d.%0d cannot reach sigmoid saturation within one LSB",
                  DW - FW - 1, FW);
  end

  typedef struct packed {
    logic                 v;
    op_e                  op;
    logic signed [DW-1:0] num;   // softmax dividend (x0)
    logic signed [DW-1:0] den;   // softmax divisor (sm_in)
  } side_t;

  // ---- stage 0: coefficient and bias -------------------------------------
  logic signed [DW-1:0] coef, bias, mag;

  nacu_coef_calc #(.DW(DW), .FW(FW), .ENTRIES(ENTRIES), .SEGF(SEGF)) u_coef (
    .op(op), .x(x0), .coef(coef), .bias(bias), .mag(mag));

  // ---- stage 1 registers -------------------------------------------------
  side_t                s1, s2, s3;
  logic                 s1_act, s1_clr, s1_mac_en;
  logic signed [DW-1:0] s1_a, s1_coef, s1_x1, s1_bias;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1 <= '0;
      s2 <= '0;
      s3 <= '0;
      s1_act    <= 1'b0;
      s1_clr    <= 1'b0;
      s1_mac_en <= 1'b0;
      s1_a      <= '0;
      s1_coef   <= '0;
      s1_x1     <= '0;
      s1_bias   <= '0;
    end else begin
      s1        <= '{v: in_valid, op: op, num: x0, den: sm_in};
      s1_act    <= (op != OP_MAC);
      s1_clr    <= acc_clr;
      s1_mac_en <= in_valid && (op != OP_SOFTMAX);
      s1_a      <= (op == OP_MAC) ? x0 : mag;
      s1_coef   <= coef;
      s1_x1     <= x1;
      s1_bias   <= bias;
      s2        <= s1;
      s3        <= s2;
    end
  end

  // ---- stages 2-3: multiply-add ------------------------------------------
  logic mac_valid;

  nacu_mac #(.DW(DW), .FW(FW)) u_mac (
    .clk(clk), .rst_n(rst_n), .in_valid(s1_mac_en), .act(s1_act),
    .acc_clr(s1_clr), .a(s1_a), .coef(s1_coef), .x1(s1_x1), .bias(s1_bias),
    .out_valid(mac_valid), .mac_out(mac_out));

  // ---- stages 4-7: divider -----------------------------------------------
  logic                 div_in_v, div_out_v, div_is_exp;
  logic signed [DW-1:0] div_num, div_den, quot;

  always_comb begin
    div_in_v = s3.v && (s3.op == OP_EXP || s3.op == OP_SOFTMAX);
    div_num  = (s3.op == OP_EXP) ? ONE : s3.num;
    div_den  = (s3.op == OP_EXP) ? mac_out : s3.den;
  end

  nacu_divider #(.DW(DW), .FW(FW), .STAGES(DIV_STAGES), .TAG_W(1)) u_div (
    .clk(clk), .rst_n(rst_n), .in_valid(div_in_v), .dividend(div_num),
    .divisor(div_den), .in_tag(s3.op == OP_EXP), .out_valid(div_out_v),
    .quotient(quot), .out_tag(div_is_exp));

  // ---- stage 8: decrementor and long-result register ---------------------
  logic signed [DW-1:0] quot_m1;
  logic                 s8_v;
  op_e                  s8_op;
  logic signed [DW-1:0] s8_data;

  two_q_minus_one #(.DW(DW), .FW(FW)) u_dec (.a(quot), .r(quot_m1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s8_v    <= 1'b0;
      s8_op   <= OP_MAC;
      s8_data <= '0;
    end else begin
      s8_v    <= div_out_v;
      s8_op   <= div_is_exp ? OP_EXP : OP_SOFTMAX;
      s8_data <= div_is_exp ? quot_m1 : quot;
    end
  end

  // ---- output multiplexer ------------------------------------------------
  logic short_v;

  always_comb begin
    short_v   = mac_valid && s3.v &&
                (s3.op == OP_MAC || s3.op == OP_SIGMOID || s3.op == OP_TANH);
    out_valid = short_v || s8_v;
    out_op    = s8_v ? s8_op : s3.op;
    out_data  = s8_v ? s8_data : mac_out;
  end

  always_ff @(posedge clk) begin
    if (rst_n) assert (!(short_v && s8_v))
      else $error("nacu: 3-cycle and 8-cycle results collided");
  end

endmodule
