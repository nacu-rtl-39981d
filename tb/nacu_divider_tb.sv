// nacu_divider_tb: random divisions, one per cycle with random gaps, against
// an integer reference: floor(A * 2^11 / B) saturated to 32767, with a
// negative dividend taken as 0 and a divisor <= 0 giving 32767. Checks the
// latency of STAGES cycles, that the tag travels with its operands, and
// that results in [1, 2] (reciprocals), in [0, 1] and overflows all occur.
module nacu_divider_tb;
  localparam int LAT = 4;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic signed [15:0] dividend = 0, divisor = 0;
  logic [0:0] in_tag = 0, out_tag;
  logic out_valid;
  logic signed [15:0] quotient;
  int checks = 0, failures = 0, cyc = 0;
  int n_recip = 0, n_frac = 0, n_ovf = 0;
  bit     exp_v   [int];
  longint exp_q   [int];
  bit     exp_tag [int];

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  nacu_divider #(.STAGES(LAT)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint av, bv, qv;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      checks++;
      if (out_valid !== (exp_v.exists(cyc) ? 1'b1 : 1'b0)) begin
        failures++;
        if (failures < 8) $display("FAIL valid cyc=%0d", cyc);
      end
      if (exp_v.exists(cyc)) begin
        checks++;
        if (quotient !== 16'(exp_q[cyc]) || out_tag[0] !== exp_tag[cyc]) begin
          failures++;
          if (failures < 8) $display("FAIL cyc=%0d got %0d expected %0d", cyc, quotient, exp_q[cyc]);
        end
      end
      in_valid = (i < 3990) && ($urandom_range(0, 3) != 0);
      in_tag   = 1'($urandom);
      case ($urandom_range(0, 4))
        0: begin dividend = 16'(2048); divisor = 16'($urandom_range(1024, 2048)); end
        1: begin divisor = 16'($urandom_range(1, 32767));
                 dividend = 16'($urandom_range(0, 32767) % (divisor + 1)); end
        2: begin dividend = 16'($urandom); divisor = 16'($urandom); end
        3: begin divisor = 16'($urandom_range(1, 4095));
                 dividend = 16'(int'(divisor) * int'($urandom_range(0, 7))); end
        default: begin dividend = 16'($urandom_range(0, 32767)); divisor = 16'($urandom_range(0, 300)); end
      endcase
      if (in_valid) begin
        av = (dividend < 0) ? 0 : longint'(dividend);
        bv = longint'(divisor);
        if (bv <= 0) qv = 32767;
        else begin
          qv = (av * 2048) / bv;
          if (qv > 32767) qv = 32767;
        end
        if (qv == 32767) n_ovf++;
        else if (qv >= 2048 && qv <= 4096) n_recip++;
        else if (qv <= 2048) n_frac++;
        exp_v[cyc + LAT]   = 1'b1;
        exp_q[cyc + LAT]   = qv;
        exp_tag[cyc + LAT] = in_tag[0];
      end
    end
    $display("recip=%0d frac=%0d ovf=%0d", n_recip, n_frac, n_ovf);
    if (n_recip == 0 || n_frac == 0 || n_ovf == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
