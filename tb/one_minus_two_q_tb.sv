// one_minus_two_q_tb: exhaustive check of r = 1 + a over every Q4.11 value
// of a = -2q in [-2, -1]. The expected value is plain integer addition.
module one_minus_two_q_tb;
  logic signed [15:0] a, r;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  one_minus_two_q dut (.a(a), .r(r));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -4096; v <= -2048; v++) begin
      a = 16'(v);
      #1;
      checks++;
      if (r !== 16'(v + 2048)) begin
        failures++;
        if (failures < 5) $display("FAIL a=%0d r=%0d expected %0d", v, r, v + 2048);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
