// tb_viterbi_variants: the decoder in further configurations, each checked end to end by
// vd_stream_check: soft decision with K = 3 (7,5); hard decision with K = 7 (171,133 octal,
// trace-back depth 30); soft decision with K = 7.
module tb_viterbi_variants;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  bit   d [3];
  int   c [3], f [3];

  vd_stream_check #(.K(3), .G0('o7),   .G1('o5),   .SOFT(1'b1), .T(100)) u_s3 (.clk, .rst_n, .done(d[0]), .checks(c[0]), .failures(f[0]));
  vd_stream_check #(.K(7), .G0('o171), .G1('o133), .SOFT(1'b0), .T(4))   u_h7 (.clk, .rst_n, .done(d[1]), .checks(c[1]), .failures(f[1]));
  vd_stream_check #(.K(7), .G0('o171), .G1('o133), .SOFT(1'b1), .T(200)) u_s7 (.clk, .rst_n, .done(d[2]), .checks(c[2]), .failures(f[2]));

  initial begin
    #5000000;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2], f[0] + f[1] + f[2] + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (d[0] && d[1] && d[2]);
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2], f[0] + f[1] + f[2]);
    $finish;
  end
endmodule
