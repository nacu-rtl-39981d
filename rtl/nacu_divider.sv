// nacu_divider: pipelined fixed-point divider, quotient = dividend / divisor.
//
// Both operands and the quotient have FW fractional bits. The divider is
// used for e^x (1 / sigma(-x), quotient in [1, 2]) and for softmax (an
// exponential divided by the sum of all exponentials, quotient in [0, 1]),
// so it works on non-negative operands: a negative dividend is taken as 0,
// and a zero or negative divisor, or a quotient of 2^(DW-1-FW) or more,
// gives the largest positive value. The quotient is truncated.
//
// Radix-2 restoring long division of dividend * 2^FW by the divisor. The
// top bits of the shifted dividend preload the partial remainder (this also
// detects overflow), and DW quotient bits follow, split as evenly as
// possible over the pipeline stages (stage s forms bits
// floor(s*DW/STAGES) .. floor((s+1)*DW/STAGES)-1, counted from the top).
// One division can start every cycle.
//
// Timing: in_valid at cycle t gives out_valid, quotient and the tag that
// travelled with the operands at cycle t+STAGES.
// Reset (rst_n low, synchronous) clears the valid flags.
// The published unit uses a pipelined divider without giving its insides;
// the restoring algorithm, the stage count and the saturation rules are this
// design's choices (4 stages give the reported 8-cycle exponential).
module nacu_divider #(
  parameter int DW     = nacu_pkg::DATA_W,
  parameter int FW     = nacu_pkg::FRAC_W,
  parameter int STAGES = 4,
  parameter int TAG_W  = 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] dividend,
  input  logic signed [DW-1:0] divisor,
  input  logic [TAG_W-1:0]     in_tag,
  output logic                 out_valid,
  output logic signed [DW-1:0] quotient,
  output logic [TAG_W-1:0]     out_tag
);

  localparam int IPS = (DW + STAGES - 1) / STAGES;  // most bits in a stage
  localparam int NW  = DW - 1 + FW;          // width of dividend * 2^FW
  localparam logic signed [DW-1:0] MAX_POS = {1'b0, {(DW - 1){1'b1}}};

  typedef struct packed {
    logic             v;
    logic             ovf;
    logic [DW:0]      rem;
    logic [DW-1:0]    low;
    logic [DW-1:0]    quo;
    logic [DW-2:0]    b;
    logic [TAG_W-1:0] tag;
  } stage_t;

  // Quotient bits formed by stage s.
  function automatic int bits_in(int s);
    return ((s + 1) * DW) / STAGES - (s * DW) / STAGES;
  endfunction

  function automatic stage_t step(stage_t s, int n);
    stage_t o = s;
    for (int k = 0; k < IPS; k++) if (k < n) begin
      o.rem = {o.rem[DW-1:0], o.low[DW-1]};
      o.low = {o.low[DW-2:0], 1'b0};
      if (o.rem >= (DW + 1)'(o.b)) begin
        o.rem = o.rem - (DW + 1)'(o.b);
        o.quo = {o.quo[DW-2:0], 1'b1};
      end else begin
        o.quo = {o.quo[DW-2:0], 1'b0};
      end
    end
    return o;
  endfunction

  stage_t        st_in;
  stage_t        st [STAGES];
  logic [DW-2:0] a_u;
  logic [NW-1:0] num;

  always_comb begin
    a_u       = dividend[DW-1] ? '0 : dividend[DW-2:0];
    num       = {a_u, {FW{1'b0}}};
    st_in.v   = in_valid;
    st_in.b   = divisor[DW-2:0];
    st_in.rem = (DW + 1)'(num[NW-1:DW]);
    st_in.low = num[DW-1:0];
    st_in.quo = '0;
    st_in.tag = in_tag;
    st_in.ovf = divisor[DW-1] || (divisor == '0) ||
                (st_in.rem >= (DW + 1)'(divisor[DW-2:0]));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int s = 0; s < STAGES; s++) st[s] <= '0;
    end else begin
      st[0] <= step(st_in, bits_in(0));
      for (int s = 1; s < STAGES; s++) st[s] <= step(st[s-1], bits_in(s));
    end
  end

  always_comb begin
    out_valid = st[STAGES-1].v;
    out_tag   = st[STAGES-1].tag;
    quotient  = (st[STAGES-1].ovf || st[STAGES-1].quo[DW-1]) ? MAX_POS
                                                              : st[STAGES-1].quo;
  end

endmodule
