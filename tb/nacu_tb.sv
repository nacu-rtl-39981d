// nacu_tb: end-to-end test of the NACU at its default parameters (Q4.11).
//
// A scoreboard keyed by the cycle in which each result is due checks the
// value, the returned operation and the latency of every operation
// (3 cycles for sigma, tanh and MAC, 8 for e and softmax). References are
// computed here with real arithmetic (functions) or integer arithmetic (MAC).
// Phases:
//   1. sigma and tanh sweeps over [-16, 16), back to back
//   2. e^x sweep over [-16, 0]
//   3. an accumulation chain with a cleared start and a saturating chain,
//      then neurons: a 6-term dot product followed by sigma of the sum
//   4. softmax over random 8-element vectors: e^(x_j - x_max) for each j,
//      the sum by MAC (x0 = e_j, x1 = 1.0), then e_j / sum for each j
//   5. softmax division by a zero sum (divider saturation)
//   6. random mixed traffic of all operations in any order
// Each mechanism (both signs of sigma and tanh, the saturated table entry,
// e, the softmax division, accumulation, clearing, MAC saturation, divider
// saturation, results leaving out of issue order, sigma applied to an
// accumulated sum) is counted and must occur.
module nacu_tb;
  import nacu_pkg::*;

  localparam int ONE = 2048;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, acc_clr = 0;
  op_e  op = OP_MAC;
  logic signed [15:0] x0 = 0, x1 = 0, sm_in = 0;
  logic out_valid;
  op_e  out_op;
  logic signed [15:0] out_data, mac_out;

  nacu dut (.*);

  always #5 clk = ~clk;

  typedef struct {
    op_e    op;
    int     issue;
    bit     exact;
    int     ival;
    real    rval;
    real    tol;
  } exp_t;

  exp_t exp_q [int];
  int   cyc = 0, checks = 0, failures = 0;
  int   last_out = 0;
  int   exp_seen [$];
  real  max_err [op_e];
  int   n_sig_pos = 0, n_sig_neg = 0, n_tanh_pos = 0, n_tanh_neg = 0;
  int   n_lut_sat = 0, n_exp = 0, n_sm = 0, n_acc = 0, n_clr = 0;
  int   n_mac_sat = 0, n_div_sat = 0, n_reorder = 0, n_neuron = 0;
  int   last_issue_seen = -1;

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real sig_r(real v);  return 1.0 / (1.0 + $exp(-v)); endfunction
  function automatic real tanh_r(real v); return 2.0 * sig_r(2.0 * v) - 1.0; endfunction
  function automatic real fx(int v);      return real'(v) / real'(ONE); endfunction
  function automatic int  to_fx(real v);
    return (v >= 0.0) ? $rtoi(v * ONE + 0.5) : -$rtoi(-v * ONE + 0.5);
  endfunction
  function automatic int sat16(int v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : v;
  endfunction
  function automatic int latency(op_e o);
    return (o == OP_EXP || o == OP_SOFTMAX) ? 8 : 3;
  endfunction

  // Compare what leaves the unit in this cycle with what is due.
  task automatic check_outputs();
    real err;
    if (exp_q.exists(cyc)) begin
      exp_t e = exp_q[cyc];
      checks++;
      if (!out_valid || out_op != e.op || (cyc - e.issue) != latency(e.op)) begin
        failures++;
        if (failures < 10) $display("FAIL cyc=%0d valid=%0b op=%s expected %s",
                                    cyc, out_valid, out_op.name(), e.op.name());
      end else begin
        if (e.issue < last_issue_seen) n_reorder++;
        last_issue_seen = e.issue;
        if (e.exact) begin
          if (int'(out_data) != e.ival) begin
            failures++;
            if (failures < 10) $display("FAIL cyc=%0d %s got %0d expected %0d",
                                        cyc, e.op.name(), out_data, e.ival);
          end
        end else begin
          err = fx(int'(out_data)) - e.rval;
          if (err < 0) err = -err;
          if (err > max_err[e.op]) max_err[e.op] = err;
          if (err > e.tol) begin
            failures++;
            if (failures < 10) $display("FAIL cyc=%0d %s got %f expected %f",
                                        cyc, e.op.name(), fx(int'(out_data)), e.rval);
          end
        end
      end
      last_out = int'(out_data);
      if (out_op == OP_EXP) exp_seen.push_back(int'(out_data));
      exp_q.delete(cyc);
    end else begin
      checks++;
      if (out_valid) begin
        failures++;
        if (failures < 10) $display("FAIL cyc=%0d unexpected result", cyc);
      end
    end
  endtask

  // One clock: check the outputs, then drive (or idle) the inputs.
  task automatic tick();
    @(negedge clk);
    check_outputs();
    in_valid = 0;
  endtask

  function automatic bit slot_free(op_e o);
    return !exp_q.exists(cyc + latency(o));
  endfunction

  task automatic issue(op_e o, int a, int b, int s, bit clr, bit exact, int ival,
                       real rval, real tol);
    exp_t e;
    in_valid = 1;
    op       = o;
    x0       = 16'(a);
    x1       = 16'(b);
    sm_in    = 16'(s);
    acc_clr  = clr;
    e.op = o; e.issue = cyc; e.exact = exact; e.ival = ival; e.rval = rval; e.tol = tol;
    if (exp_q.exists(cyc + latency(o))) begin
      failures++;
      $display("FAIL testbench scheduled two results in cycle %0d", cyc + latency(o));
    end
    exp_q[cyc + latency(o)] = e;
  endtask

  task automatic drain();
    repeat (12) tick();
  endtask

  int acc_model;

  task automatic issue_sigma(int v);
    if (v < 0) n_sig_neg++; else n_sig_pos++;
    if ((v < 0 ? -v : v) >= 13 * ONE) n_lut_sat++;
    issue(OP_SIGMOID, v, 0, 0, 0, 0, 0, sig_r(fx(v)), 1.0e-3);
    acc_model = 0;  // mac_out is overwritten; value not tracked exactly
  endtask

  task automatic issue_tanh(int v);
    if (v < 0) n_tanh_neg++; else n_tanh_pos++;
    if (2 * (v < 0 ? -v : v) >= 13 * ONE) n_lut_sat++;
    issue(OP_TANH, v, 0, 0, 0, 0, 0, tanh_r(fx(v)), 1.6e-3);
  endtask

  task automatic issue_exp(int v);
    n_exp++;
    issue(OP_EXP, v, 0, 0, 0, 0, 0, $exp(fx(v)), 3.0e-3);
  endtask

  task automatic issue_mac(int a, int b, bit clr);
    int p;
    p = sat16(int'((longint'(a) * longint'(b) + 1024) >>> 11));
    if (clr) begin acc_model = p; n_clr++; end
    else begin
      n_acc++;
      if (acc_model + p > 32767 || acc_model + p < -32768) n_mac_sat++;
      acc_model = sat16(acc_model + p);
    end
    issue(OP_MAC, a, b, 0, clr, 1, acc_model, 0.0, 0.0);
  endtask

  initial begin
    int xs [8];
    int es [8];
    int xmax, sum, r;
    real rsum;
    repeat (3) @(posedge clk);
    rst_n = 1;
    tick();

    // 1. sigma and tanh sweeps
    for (int v = -32768; v < 32768; v += 97) begin issue_sigma(v); tick(); end
    drain();
    for (int v = -32768; v < 32768; v += 89) begin issue_tanh(v); tick(); end
    drain();

    // 2. e^x for normalised inputs x - x_max in [-16, 0]
    for (int v = -32768; v <= 0; v += 61) begin issue_exp(v); tick(); end
    issue_exp(0); tick();
    drain();

    // 3. accumulation: cleared start, then a chain; then a saturating chain
    issue_mac(3 * ONE / 2, ONE / 4, 1); tick();
    for (int i = 0; i < 30; i++) begin
      issue_mac(int'($urandom_range(0, 8191)) - 4096, int'($urandom_range(0, 8191)) - 4096, 0);
      tick();
    end
    issue_mac(4 * ONE, 4 * ONE, 1); tick();
    for (int i = 0; i < 6; i++) begin issue_mac(4 * ONE, 4 * ONE, 0); tick(); end
    for (int i = 0; i < 6; i++) begin issue_mac(-4 * ONE, 4 * ONE, 0); tick(); end
    drain();

    // 3b. a neuron: dot product on the MAC, then sigma of the sum read back
    for (int t = 0; t < 10; t++) begin
      for (int i = 0; i < 6; i++) begin
        issue_mac(int'($urandom_range(0, 4095)) - 2048, int'($urandom_range(0, 4095)) - 2048, i == 0);
        tick();
      end
      repeat (3) tick();
      n_neuron++;
      issue_sigma(last_out); tick();
      drain();
    end

    $display("phase 4 at cycle %0d", cyc);
    // 4. softmax over random vectors
    for (int t = 0; t < 20; t++) begin
      xmax = -32768;
      foreach (xs[j]) begin
        xs[j] = int'($urandom_range(0, 32000)) - 16000;   // about [-7.8, 7.8]
        if (xs[j] > xmax) xmax = xs[j];
      end
      exp_seen.delete();
      foreach (xs[j]) begin issue_exp(xs[j] - xmax); tick(); end
      // collect the exponentials as they leave the unit
      while (exp_seen.size() < 8) tick();
      foreach (es[j]) es[j] = exp_seen[j];
      foreach (es[j]) begin issue_mac(es[j], ONE, j == 0); tick(); end
      repeat (3) tick();
      sum = last_out;
      rsum = 0.0;
      foreach (xs[j]) rsum += $exp(fx(xs[j] - xmax));
      foreach (es[j]) begin
        n_sm++;
        issue(OP_SOFTMAX, es[j], 0, sum, 0, 0, 0, $exp(fx(xs[j] - xmax)) / rsum, 2.0e-3);
        tick();
      end
      drain();
    end

    // 5. division by a zero sum saturates
    n_div_sat++;
    issue(OP_SOFTMAX, ONE, 0, 0, 0, 1, 32767, 0.0, 0.0); tick();
    drain();

    $display("phase 6 at cycle %0d", cyc);
    // 6. mixed traffic: any operation in any cycle whose result slot is free
    for (int i = 0; i < 3000; i++) begin
      r = int'($urandom_range(0, 4));
      case (r)
        0: if (slot_free(OP_SIGMOID)) issue_sigma(int'($urandom_range(0, 65535)) - 32768);
        1: if (slot_free(OP_TANH))    issue_tanh(int'($urandom_range(0, 65535)) - 32768);
        2: if (slot_free(OP_EXP))     issue_exp(-int'($urandom_range(0, 32768)));
        3: if (slot_free(OP_MAC))
             issue_mac(int'($urandom_range(0, 8191)) - 4096, int'($urandom_range(0, 8191)) - 4096, 1);
        default: if (slot_free(OP_SOFTMAX)) begin
          int d, n;
          d = int'($urandom_range(1, 16384));
          n = int'($urandom_range(0, d));
          n_sm++;
          issue(OP_SOFTMAX, n, 0, d, 0, 1, (n * ONE) / d, 0.0, 0.0);
        end
      endcase
      tick();
    end
    drain();

    $display("max error: sigma %g  tanh %g  e %g  softmax %g",
             max_err[OP_SIGMOID], max_err[OP_TANH], max_err[OP_EXP], max_err[OP_SOFTMAX]);
    $display("events: sig+ %0d sig- %0d tanh+ %0d tanh- %0d lut_sat %0d exp %0d softmax %0d",
             n_sig_pos, n_sig_neg, n_tanh_pos, n_tanh_neg, n_lut_sat, n_exp, n_sm);
    $display("events: acc %0d clr %0d mac_sat %0d div_sat %0d out_of_order %0d neuron %0d",
             n_acc, n_clr, n_mac_sat, n_div_sat, n_reorder, n_neuron);
    if (n_sig_pos == 0)  begin failures++; $display("FAIL never: sigma x>=0"); end
    if (n_sig_neg == 0)  begin failures++; $display("FAIL never: sigma x<0"); end
    if (n_tanh_pos == 0) begin failures++; $display("FAIL never: tanh x>=0"); end
    if (n_tanh_neg == 0) begin failures++; $display("FAIL never: tanh x<0"); end
    if (n_lut_sat == 0)  begin failures++; $display("FAIL never: saturated entry"); end
    if (n_exp == 0)      begin failures++; $display("FAIL never: e"); end
    if (n_sm == 0)       begin failures++; $display("FAIL never: softmax"); end
    if (n_acc == 0)      begin failures++; $display("FAIL never: accumulate"); end
    if (n_clr == 0)      begin failures++; $display("FAIL never: clear"); end
    if (n_mac_sat == 0)  begin failures++; $display("FAIL never: MAC saturation"); end
    if (n_div_sat == 0)  begin failures++; $display("FAIL never: divider saturation"); end
    if (n_reorder == 0)  begin failures++; $display("FAIL never: out-of-order results"); end
    if (n_neuron == 0)   begin failures++; $display("FAIL never: sigma of an accumulated sum"); end
    if (exp_q.num() != 0) begin failures++; $display("FAIL results never arrived"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
