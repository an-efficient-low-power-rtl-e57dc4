// tbu_check: drives one trace-back unit of constraint length K for tb_tbu (see there).
module tbu_check #(
  parameter int K = 3
) (
  input  logic clk,
  input  logic rst_n,
  output bit   done
);
  localparam int M = K - 1, NS = 1 << M, L = 5 * (K - 1), NSRC = 40 * L;
  localparam int LW = $clog2(L);

  logic [NS-1:0] dec;
  logic          dec_valid;
  logic [M-1:0]  best_state;
  logic          bit_valid, bit_out;
  logic [LW-1:0] bit_idx;
  int checks = 0, failures = 0;
  bit src [NSRC];
  int nwritten = 0, nout = 0;

  tbu #(.K(K), .L(L)) dut (.*);

  always @(posedge clk) begin
    if (rst_n && dec_valid) nwritten <= nwritten + 1;
    if (rst_n && bit_valid) begin
      int b, c, expect_idx;
      b = nout / L;
      expect_idx = L - 1 - (nout % L);
      c = b * L + expect_idx;
      checks++;
      if (int'(bit_idx) != expect_idx || bit_out != src[c] || nwritten != 3 * L + nout + 1) begin
        failures++;
        if (failures < 10)
          $display("K=%0d out %0d: idx %0d/%0d bit %0d/%0d at write %0d/%0d", K, nout, bit_idx,
                   expect_idx, bit_out, src[c], nwritten, 3 * L + nout + 1);
      end
      nout <= nout + 1;
    end
  end

  initial begin
    logic [M-1:0] s;
    dec = '0; dec_valid = 0; best_state = '0; s = '0;
    for (int n = 0; n < NSRC; n++) src[n] = 1'($urandom_range(0, 1));
    @(posedge rst_n);
    @(posedge clk);
    for (int n = 0; n < NSRC; n++) begin
      logic [M-1:0] sn;
      @(negedge clk);
      while ($urandom_range(0, 5) == 0) begin
        dec_valid = 0;
        @(negedge clk);
      end
      sn = M'({src[n], s} >> 1);
      dec = NS'($urandom);
      dec[sn] = s[0];
      best_state = sn;
      dec_valid = 1;
      s = sn;
    end
    @(negedge clk);
    dec_valid = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (nout != NSRC - 3 * L) begin
      failures++;
      $display("K=%0d: %0d bits out, expected %0d", K, nout, NSRC - 3 * L);
    end
    done = 1;
  end
endmodule
