// nacu_mac_tb: random operations on the multiply-add unit, one per cycle
// with random gaps, compared with an integer reference model evaluated at
// issue time. Checks the two-cycle latency (out_valid exactly two cycles
// after in_valid), activation mode (a*coef + bias), accumulation, clearing
// the accumulator and saturation, and that each of those occurred.
module nacu_mac_tb;
  localparam int LAT = 2;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, act = 0, acc_clr = 0;
  logic signed [15:0] a = 0, coef = 0, x1 = 0, bias = 0;
  logic out_valid;
  logic signed [15:0] mac_out;
  int  checks = 0, failures = 0, cyc = 0;
  int  n_act = 0, n_acc = 0, n_clr = 0, n_sat = 0;
  longint acc_model = 0;
  bit      exp_v   [int];
  longint  exp_val [int];

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  nacu_mac dut (.*);

  function automatic longint sat16(longint v, ref int n);
    if (v > 32767)  begin n++; return 32767;  end
    if (v < -32768) begin n++; return -32768; end
    return v;
  endfunction

  function automatic logic signed [15:0] rnd16();
    // mostly moderate values, sometimes full range to reach saturation
    if ($urandom_range(0, 7) == 0) return 16'($urandom);
    return 16'($signed($urandom_range(0, 8191)) - 4096);
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint p;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      // check what is due this cycle
      checks++;
      if (out_valid !== (exp_v.exists(cyc) ? 1'b1 : 1'b0)) begin
        failures++;
        if (failures < 8) $display("FAIL valid cyc=%0d", cyc);
      end
      if (exp_v.exists(cyc)) begin
        checks++;
        if (mac_out !== 16'(exp_val[cyc])) begin
          failures++;
          if (failures < 8) $display("FAIL cyc=%0d got %0d expected %0d", cyc, mac_out, exp_val[cyc]);
        end
      end
      // drive the next operation
      in_valid = (i < 3990) && ($urandom_range(0, 3) != 0);
      act      = ($urandom_range(0, 2) == 0);
      acc_clr  = ($urandom_range(0, 9) == 0);
      a    = rnd16();
      coef = rnd16();
      x1   = rnd16();
      bias = rnd16();
      if (in_valid) begin
        p = (longint'(a) * longint'(act ? coef : x1) + 1024) >>> 11;
        p = sat16(p, n_sat);
        if (act)          begin acc_model = sat16(p + longint'(bias), n_sat); n_act++; end
        else if (acc_clr) begin acc_model = p; n_clr++; end
        else              begin acc_model = sat16(p + acc_model, n_sat); n_acc++; end
        exp_v[cyc + LAT]   = 1'b1;
        exp_val[cyc + LAT] = acc_model;
      end
    end
    $display("act=%0d acc=%0d clr=%0d sat=%0d", n_act, n_acc, n_clr, n_sat);
    if (n_act == 0 || n_acc == 0 || n_clr == 0 || n_sat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
