// nacu_width_tb: runs the NACU at the other word widths it was compared at:
// 6, 10, 18 and 21 bits, and 23 bits with 18 fractional bits. Where only the
// width is known, the integer part is the smallest the sigmoid-saturation
// rule allows (nacu_pkg::format_saturates): Q2.3, Q3.6, Q4.13, Q4.16. The
// table keeps its default 53 entries, so the wider formats gain little
// accuracy over 16 bits. Each instance is checked by nacu_width_check.
module nacu_width_tb;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int N = 5;
  logic done [N];
  int   chk  [N];
  int   fail [N];

  nacu_width_check #(.DW(6),  .FW(3))  u6  (.clk(clk), .done(done[0]), .checks(chk[0]), .failures(fail[0]));
  nacu_width_check #(.DW(10), .FW(6))  u10 (.clk(clk), .done(done[1]), .checks(chk[1]), .failures(fail[1]));
  nacu_width_check #(.DW(18), .FW(13)) u18 (.clk(clk), .done(done[2]), .checks(chk[2]), .failures(fail[2]));
  nacu_width_check #(.DW(21), .FW(16)) u21 (.clk(clk), .done(done[3]), .checks(chk[3]), .failures(fail[3]));
  nacu_width_check #(.DW(23), .FW(18)) u23 (.clk(clk), .done(done[4]), .checks(chk[4]), .failures(fail[4]));

  function automatic bit all_done();
    foreach (done[i]) if (!done[i]) return 0;
    return 1;
  endfunction

  function automatic void report(int extra);
    int c = 0, f = extra;
    foreach (chk[i]) begin c += chk[i]; f += fail[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    report(1);
    $finish;
  end

  initial begin
    @(posedge clk);
    while (!all_done()) @(posedge clk);
    report(0);
    $finish;
  end
endmodule
