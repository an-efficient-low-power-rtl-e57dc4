// tb_viterbi_top: end-to-end test of the decoder at its default parameters (K = 3, generators
// 7/5, hard decision, T = 2, L = 10).
//
// Random source bits are convolutionally encoded here (encoder written independently of the
// RTL), isolated channel bit errors are injected, and the decoded stream must equal the source.
// Phase 1 streams one symbol per clock and checks the latency of every bit (LATENCY = 4L + 2
// clock edges) and the throughput (one decoded bit per clock). Phase 2 adds random gaps in
// in_valid (stalls) and checks the values only. Mechanisms counted, each must occur: channel
// errors corrected, states purged by the T-algorithm, purged states revived, bank swaps of the
// survivor memory, stall cycles.
module tb_viterbi_top;
  localparam int K = 3, L = 5 * (K - 1), LATENCY = 4 * L + 2;
  localparam int G0 = 'o7, G1 = 'o5;
  localparam int N1 = 3000, N2 = 3000, NSRC = N1 + N2;

  logic       clk = 0, rst_n = 0, in_valid = 0;
  logic [1:0] rx = '0;
  logic       out_valid, out_bit;

  viterbi_top dut (.*);

  always #5 clk = !clk;

  int checks = 0, failures = 0;
  bit src [NSRC + 4 * L];
  longint acc_cyc [NSRC + 4 * L];
  longint cyc = 0;
  int nacc = 0, nout = 0, nerr = 0, stalls = 0, purges = 0, revives = 0, swaps = 0;
  longint alive_sum = 0, nsteps = 0;

  initial begin
    #2000000;
    failures++;
    $display("watchdog");
    $display("average live states per step: %0d.%02d of %0d", alive_sum / nsteps,
             (alive_sum * 100 / nsteps) % 100, 1 << (K - 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Observe the mechanisms inside the decoder.
  logic [1:0] blk_q;
  logic [3:0] alive_q;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (in_valid) nacc <= nacc + 1;
      if (!in_valid) stalls <= stalls + 1;
      blk_q   <= dut.u_tbu.blk;
      alive_q <= dut.u_pmu.alive;
      if (blk_q != dut.u_tbu.blk) swaps <= swaps + 1;
      if (dut.u_pmu.dec_valid) begin
        purges  <= purges + int'(dut.u_pmu.n_purged);
        alive_sum <= alive_sum + $countones(dut.u_pmu.alive);
        nsteps  <= nsteps + 1;
        revives <= revives + $countones(dut.u_pmu.alive & ~alive_q);
      end
    end
    if (rst_n && out_valid) begin
      checks++;
      if (nout < NSRC && out_bit != src[nout]) begin
        failures++;
        if (failures < 10) $display("bit %0d: got %0d exp %0d", nout, out_bit, src[nout]);
      end
      if (nout + 4 * L < N1) begin
        checks++;
        if (cyc - acc_cyc[nout] != longint'(LATENCY)) begin
          failures++;
          if (failures < 10) $display("bit %0d latency %0d", nout, cyc - acc_cyc[nout]);
        end
      end
      nout <= nout + 1;
    end
  end

  initial begin
    logic [K-2:0] s;
    int since_err;
    s = '0;
    since_err = 0;
    for (int n = 0; n < NSRC; n++) src[n] = 1'($urandom_range(0, 1));
    for (int n = NSRC; n < NSRC + 4 * L; n++) src[n] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < NSRC + 4 * L; n++) begin
      logic [K-1:0] r;
      logic [1:0]   sym;
      if (n >= N1) begin
        while ($urandom_range(0, 3) == 0) begin in_valid = 0; @(negedge clk); end
      end
      r   = {src[n], s};
      sym = {^(r & K'(G0)), ^(r & K'(G1))};
      s   = r[K-1:1];
      since_err++;
      if (since_err > 15 && $urandom_range(0, 9) == 0) begin
        sym[$urandom_range(0, 1)] ^= 1'b1;
        nerr++;
        since_err = 0;
      end
      rx = sym;
      in_valid = 1;
      acc_cyc[n] = cyc + 1;
      @(negedge clk);
    end
    in_valid = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (nout != NSRC) begin
      failures++;
      $display("decoded %0d bits, expected %0d", nout, NSRC);
    end
    checks++;
    if (nerr == 0 || purges == 0 || revives == 0 || swaps == 0 || stalls == 0) begin
      failures++;
      $display("a mechanism never happened");
    end
    $display("bits=%0d channel errors=%0d purged=%0d revived=%0d bank swaps=%0d stall cycles=%0d",
             nout, nerr, purges, revives, swaps, stalls);
    $display("average live states per step: %0d.%02d of %0d", alive_sum / nsteps,
             (alive_sum * 100 / nsteps) % 100, 1 << (K - 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
