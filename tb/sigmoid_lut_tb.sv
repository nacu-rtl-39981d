// sigmoid_lut_tb: checks the PWL sigmoid table against the exact sigmoid.
// For every magnitude in [0, 32) (step 3 LSB) the line m*x + q selected by
// the table must stay within 8e-4 of 1/(1+e^-x) (about 1.6 LSB of Q4.11).
// Every slope must be non-negative, every bias in [0.5, 1], and inputs from
// 13.0 up must select the saturated line m = 0, q = 1.
module sigmoid_lut_tb;
  logic [15:0]        mag;
  logic signed [15:0] m, q;
  int  checks = 0, failures = 0;
  real x, y, err, max_err = 0.0;
  logic clk = 0;
  always #5 clk = ~clk;

  sigmoid_lut dut (.mag(mag), .m(m), .q(q));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v += 3) begin
      mag = 16'(v);
      #1;
      x   = real'(v) / 2048.0;
      y   = real'(m) * x / 2048.0 + real'(q) / 2048.0;
      err = y - 1.0 / (1.0 + $exp(-x));
      if (err < 0) err = -err;
      if (err > max_err) max_err = err;
      checks++;
      if (err > 8e-4 || m < 0 || q < 1024 || q > 2048) begin
        failures++;
        if (failures < 5) $display("FAIL x=%f m=%0d q=%0d err=%g", x, m, q, err);
      end
      if (v >= 13 * 2048) begin
        checks++;
        if (m != 0 || q != 2048) begin
          failures++;
          if (failures < 5) $display("FAIL saturation x=%f m=%0d q=%0d", x, m, q);
        end
      end
    end
    $display("max abs error %g", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
