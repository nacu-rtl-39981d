// nacu_mac: shared multiply-and-add unit with accumulator feedback.
//
// Two pipeline stages. Stage 1 multiplies a by the selected second operand
// and rounds the product to FW fractional bits (round half up, saturated to
// DW bits). Stage 2 adds the selected addend and stores the saturated sum in
// mac_out, the register that is both the function result and the
// accumulator:
//   act = 1 (sigma, tanh, e)   mac_out <= a*coef + bias
//   act = 0 (MAC)              mac_out <= a*x1 + (acc_clr ? 0 : mac_out)
// mac_out changes only when a valid operation reaches stage 2, so an
// accumulation survives idle cycles but is overwritten by any activation.
// Back-to-back MAC operations accumulate correctly because the feedback
// closes within stage 2.
//
// Timing: in_valid at cycle t gives out_valid and mac_out at cycle t+2.
// Reset (rst_n low, synchronous) clears valid flags and the accumulator.
// The shared multiply-add with accumulator feedback is the published
// structure; the two-stage split, rounding, saturation and acc_clr are this
// design's choices.
module nacu_mac #(
  parameter int DW = nacu_pkg::DATA_W,
  parameter int FW = nacu_pkg::FRAC_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic                 act,
  input  logic                 acc_clr,
  input  logic signed [DW-1:0] a,
  input  logic signed [DW-1:0] coef,
  input  logic signed [DW-1:0] x1,
  input  logic signed [DW-1:0] bias,
  output logic                 out_valid,
  output logic signed [DW-1:0] mac_out
);

  localparam logic signed [DW-1:0] MAX_POS = {1'b0, {(DW - 1){1'b1}}};
  localparam logic signed [DW-1:0] MIN_NEG = {1'b1, {(DW - 1){1'b0}}};

  function automatic logic signed [DW-1:0] sat(input logic signed [2*DW-1:0] v);
    if (v > (2*DW)'(MAX_POS))      return MAX_POS;
    else if (v < (2*DW)'(MIN_NEG)) return MIN_NEG;
    else                         return v[DW-1:0];
  endfunction

  logic signed [DW-1:0]   mul_b;
  logic signed [2*DW-1:0] prod_full, prod_rnd;
  logic signed [DW-1:0]   prod_r, bias_r;
  logic                   v1, act_r, clr_r;
  logic signed [2*DW-1:0] sum;

  always_comb begin
    mul_b     = act ? coef : x1;
    prod_full = (2*DW)'(a) * (2*DW)'(mul_b);
    prod_rnd  = (prod_full + (2*DW)'(1 <<< (FW - 1))) >>> FW;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1     <= 1'b0;
      act_r  <= 1'b0;
      clr_r  <= 1'b0;
      prod_r <= '0;
      bias_r <= '0;
    end else begin
      v1     <= in_valid;
      act_r  <= act;
      clr_r  <= acc_clr;
      prod_r <= sat(prod_rnd);
      bias_r <= bias;
    end
  end

  always_comb begin
    if (act_r)      sum = (2*DW)'(prod_r) + (2*DW)'(bias_r);
    else if (clr_r) sum = (2*DW)'(prod_r);
    else            sum = (2*DW)'(prod_r) + (2*DW)'(mac_out);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      mac_out   <= '0;
    end else begin
      out_valid <= v1;
      if (v1) mac_out <= sat(sum);
    end
  end

endmodule
