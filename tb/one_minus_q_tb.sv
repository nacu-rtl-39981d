// one_minus_q_tb: exhaustive check of r = 1 - q over every Q4.11 value of
// q in [0.5, 1]. The expected value is plain integer subtraction.
module one_minus_q_tb;
  logic signed [15:0] q, r;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  one_minus_q dut (.q(q), .r(r));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 1024; v <= 2048; v++) begin
      q = 16'(v);
      #1;
      checks++;
      if (r !== 16'(2048 - v)) begin
        failures++;
        if (failures < 5) $display("FAIL q=%0d r=%0d expected %0d", v, r, 2048 - v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
