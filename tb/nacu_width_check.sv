// nacu_width_check: sweeps one NACU instance of a given word width through
// sigma, tanh (whole input range) and e^x (inputs in [-2^IB, 0]) and checks
// every result against real arithmetic, together with its latency (3 cycles
// for sigma and tanh, DIV_STAGES + 4 for e). Tolerances grow with the LSB:
//   sigma  7e-4   + 1.25 LSB      tanh  1.4e-3 + 2.5 LSB
//   e      2.6e-3 + 5 LSB         (4x the sigmoid error plus the divider's)
// Used by nacu_width_tb; reports its counts and maximum errors on ports.
module nacu_width_check
  import nacu_pkg::*;
#(
  parameter int DW = 16,
  parameter int FW = 11,
  parameter int DIV_STAGES = 4
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam real LSB = 1.0 / real'(64'(1) << FW);

  logic rst_n = 0, in_valid = 0, acc_clr = 0;
  op_e  op = OP_MAC;
  logic signed [DW-1:0] x0 = '0, x1 = '0, sm_in = '0;
  logic out_valid;
  op_e  out_op;
  logic signed [DW-1:0] out_data, mac_out;

  nacu #(.DW(DW), .FW(FW), .DIV_STAGES(DIV_STAGES)) dut (.*);

  typedef struct { op_e op; int issue; real rval; real tol; } exp_t;
  exp_t exp_q [int];
  int   cyc = 0;
  real  max_err [op_e];

  always @(posedge clk) cyc <= cyc + 1;

  function automatic real sig_r(real v); return 1.0 / (1.0 + $exp(-v)); endfunction
  function automatic int latency(op_e o); return (o == OP_EXP) ? DIV_STAGES + 4 : 3; endfunction

  task automatic tick();
    real err;
    @(negedge clk);
    if (exp_q.exists(cyc)) begin
      exp_t e = exp_q[cyc];
      checks++;
      err = real'(out_data) * LSB - e.rval;
      if (err < 0) err = -err;
      if (err > max_err[e.op]) max_err[e.op] = err;
      if (!out_valid || out_op != e.op || err > e.tol) begin
        failures++;
        if (failures < 6) $display("FAIL Q%0d.%0d %s cyc=%0d got %f expected %f",
                                   DW - FW - 1, FW, e.op.name(), cyc,
                                   real'(out_data) * LSB, e.rval);
      end
      exp_q.delete(cyc);
    end else if (out_valid) begin
      checks++;
      failures++;
      $display("FAIL Q%0d.%0d unexpected result in cycle %0d", DW - FW - 1, FW, cyc);
    end
    in_valid = 0;
  endtask

  task automatic issue(op_e o, int v, real r, real tol);
    exp_t e;
    in_valid = 1;
    op = o;
    x0 = DW'(v);
    e.op = o; e.issue = cyc; e.rval = r; e.tol = tol;
    exp_q[cyc + latency(o)] = e;
  endtask

  initial begin
    int lo, hi, step;
    real xr;
    done = 0;
    checks = 0;
    failures = 0;
    lo   = -(1 << (DW - 1));
    hi   = (1 << (DW - 1)) - 1;
    step = (DW > 11) ? (1 << (DW - 11)) - 1 : 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    tick();
    for (int v = lo; v <= hi; v += step) begin
      xr = real'(v) * LSB;
      issue(OP_SIGMOID, v, sig_r(xr), 7e-4 + 1.25 * LSB);
      tick();
    end
    repeat (16) tick();
    for (int v = lo; v <= hi; v += step) begin
      xr = real'(v) * LSB;
      issue(OP_TANH, v, 2.0 * sig_r(2.0 * xr) - 1.0, 1.4e-3 + 2.5 * LSB);
      tick();
    end
    repeat (16) tick();
    for (int v = lo; v <= 0; v += step) begin
      xr = real'(v) * LSB;
      issue(OP_EXP, v, $exp(xr), 2.6e-3 + 5.0 * LSB);
      tick();
    end
    repeat (16) tick();
    if (exp_q.num() != 0) begin
      failures++;
      $display("FAIL Q%0d.%0d %0d results never arrived", DW - FW - 1, FW, exp_q.num());
    end
    $display("Q%0d.%0d: max error sigma %g tanh %g e %g (LSB %g)", DW - FW - 1, FW,
             max_err[OP_SIGMOID], max_err[OP_TANH], max_err[OP_EXP], LSB);
    done = 1;
  end
endmodule
