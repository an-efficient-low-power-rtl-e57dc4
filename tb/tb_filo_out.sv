// tb_filo_out: blocks of L = 10 random bits are presented last column first (index L-1 down to
// 0), with random gaps; the output must be the same bits in column order, one block behind,
// one output per input.
module tb_filo_out;
  localparam int L = 10, NB = 50;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_bit = 0;
  logic [3:0] in_idx = 0;
  logic out_valid, out_bit;
  bit src [NB * L];
  int checks = 0, failures = 0, nin = 0, nout = 0;

  filo_out #(.L(L)) dut (.*);
  always #5 clk = !clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && in_valid) nin <= nin + 1;
    if (rst_n && out_valid) begin
      checks++;
      if (out_bit != src[nout] || nin != nout + L + 1) begin
        failures++;
        if (failures < 10) $display("out %0d: %0d exp %0d (inputs %0d)", nout, out_bit, src[nout], nin);
      end
      nout <= nout + 1;
    end
  end

  initial begin
    for (int i = 0; i < NB * L; i++) src[i] = 1'($urandom_range(0, 1));
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int b = 0; b < NB; b++) begin
      for (int i = L - 1; i >= 0; i--) begin
        @(negedge clk);
        while ($urandom_range(0, 3) == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1; in_idx = 4'(i); in_bit = src[b * L + i];
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (nout != (NB - 1) * L) begin failures++; $display("count %0d", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
