// tb_tbu: the trace-back unit with survivor memory, fed with decision columns built here from
// a random source path: for the true state of every column the decision points to its true
// predecessor, the decisions of all other states are random, and best_state is the true state.
// Trace-back from the true state must therefore return the source bits. Checks every decoded
// bit, its column index, and that the j-th decoded bit leaves one cycle after write step
// 3L + j (gaps in dec_valid included). K = 3 (L = 10) and K = 5 (L = 20) are run.
module tb_tbu;
  localparam int NSRC = 600;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = !clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit done3, done5;
  tbu_check #(.K(3)) c3 (.clk, .rst_n, .done(done3));
  tbu_check #(.K(5)) c5 (.clk, .rst_n, .done(done5));

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (done3 && done5);
    checks   = c3.checks + c5.checks;
    failures = c3.failures + c5.failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
