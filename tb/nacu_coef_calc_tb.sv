// nacu_coef_calc_tb: checks the selected line coef*|x| + bias against the
// exact function, over every 5th Q4.11 input and each operation:
//   OP_SIGMOID  1/(1+e^-x)         tolerance 8e-4
//   OP_TANH     tanh(x)            tolerance 1.6e-3 (twice the sigmoid's)
//   OP_EXP      1/(1+e^-|x|)       tolerance 8e-4 (first term of e^x)
// It also checks the magnitude output and counts inputs of both signs.
module nacu_coef_calc_tb;
  import nacu_pkg::*;
  op_e                op;
  logic signed [15:0] x, coef, bias, mag;
  int  checks = 0, failures = 0, n_neg = 0, n_pos = 0;
  real xr, y, ref_v, err, tol;
  logic clk = 0;
  always #5 clk = ~clk;

  nacu_coef_calc dut (.op(op), .x(x), .coef(coef), .bias(bias), .mag(mag));

  function automatic real tanh_r(real v);
    return (1.0 - $exp(-2.0 * v)) / (1.0 + $exp(-2.0 * v));
  endfunction

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    op_e ops [3] = '{OP_SIGMOID, OP_TANH, OP_EXP};
    foreach (ops[k]) begin
      for (int v = -32767; v < 32768; v += 5) begin
        op = ops[k];
        x  = 16'(v);
        #1;
        xr = real'(v) / 2048.0;
        if (v < 0) n_neg++; else n_pos++;
        y = real'(coef) / 2048.0 * real'(mag) / 2048.0 + real'(bias) / 2048.0;
        case (op)
          OP_SIGMOID: begin ref_v = 1.0 / (1.0 + $exp(-xr)); tol = 8e-4; end
          OP_TANH:    begin ref_v = tanh_r(xr);              tol = 1.6e-3; end
          default:    begin ref_v = 1.0 / (1.0 + $exp(xr < 0 ? xr : -xr)); tol = 8e-4; end
        endcase
        err = (y > ref_v) ? y - ref_v : ref_v - y;
        checks++;
        if (err > tol) begin
          failures++;
          if (failures < 8) $display("FAIL op=%s x=%f y=%f ref=%f", op.name(), xr, y, ref_v);
        end
        checks++;
        if (mag != 16'(v < 0 ? -v : v)) begin
          failures++;
          if (failures < 8) $display("FAIL mag x=%0d mag=%0d", v, mag);
        end
      end
    end
    if (n_neg == 0 || n_pos == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
