// vd_stream_check: drives one decoder configuration for tb_viterbi_variants.
//
// Encodes NSRC random bits with the configured code (encoder written here), sends them over a
// channel model and checks that the decoded stream equals the source. Hard decision: isolated
// bit errors, at least 3K symbols apart. Soft decision: each code bit becomes the ideal value
// 0 or 7 plus uniform noise in -NOISE..NOISE, clipped to 0..7; now and then (at least 3K
// symbols apart) one value is pushed across the middle into a wrong but weak value. Random gaps
// in in_valid. Counts channel errors and purged states; both must occur.
module vd_stream_check #(
  parameter int K     = 3,
  parameter int G0    = 'o7,
  parameter int G1    = 'o5,
  parameter bit SOFT  = 1'b0,
  parameter int T     = 2,
  parameter int NOISE = 2,
  parameter int NSRC  = 3000
) (
  input  logic clk,
  input  logic rst_n,
  output bit   done,
  output int   checks,
  output int   failures
);
  localparam int L = 5 * (K - 1), Q = SOFT ? 3 : 1;

  logic           in_valid = 0;
  logic [2*Q-1:0] rx = '0;
  logic           out_valid, out_bit;
  bit             src [NSRC + 4 * L];
  int nout = 0, nerr = 0, purges = 0;
  longint alive_sum = 0, nsteps = 0;

  viterbi_top #(.K(K), .G0(G0), .G1(G1), .SOFT(SOFT), .T_THRESH(T)) dut (.*);

  initial begin checks = 0; failures = 0; end

  always @(posedge clk) begin
    if (rst_n && dut.u_pmu.dec_valid) begin
      purges    <= purges + int'(dut.u_pmu.n_purged);
      alive_sum <= alive_sum + $countones(dut.u_pmu.alive);
      nsteps    <= nsteps + 1;
    end
    if (rst_n && out_valid) begin
      checks <= checks + 1;
      if (out_bit != src[nout]) begin
        failures <= failures + 1;
        if (failures < 5) $display("K=%0d SOFT=%0d bit %0d: got %0d exp %0d", K, SOFT, nout, out_bit, src[nout]);
      end
      nout <= nout + 1;
    end
  end

  function automatic logic [Q-1:0] chan(bit b, bit flip);
    int v;
    if (!SOFT) return Q'(b ^ flip);
    v = (b ? 7 : 0) + $urandom_range(0, 2 * NOISE) - NOISE;
    if (flip) v = b ? 3 : 4;
    if (v < 0) v = 0;
    if (v > 7) v = 7;
    return Q'(v);
  endfunction

  initial begin
    logic [K-2:0] s;
    int since_err;
    s = '0;
    since_err = 0;
    done = 0;
    for (int n = 0; n < NSRC; n++) src[n] = 1'($urandom_range(0, 1));
    for (int n = NSRC; n < NSRC + 4 * L; n++) src[n] = 0;
    @(posedge rst_n);
    @(negedge clk);
    for (int n = 0; n < NSRC + 4 * L; n++) begin
      logic [K-1:0] r;
      bit c1, c0, f1, f0;
      while ($urandom_range(0, 7) == 0) begin in_valid = 0; @(negedge clk); end
      r  = {src[n], s};
      c1 = ^(r & K'(G0));
      c0 = ^(r & K'(G1));
      s  = r[K-1:1];
      f1 = 0; f0 = 0;
      since_err++;
      if (since_err > 3 * K && $urandom_range(0, 9) == 0) begin
        if ($urandom_range(0, 1) == 1) f1 = 1; else f0 = 1;
        nerr++;
        since_err = 0;
      end
      rx = {chan(c1, f1), chan(c0, f0)};
      in_valid = 1;
      @(negedge clk);
    end
    in_valid = 0;
    repeat (5) @(negedge clk);
    if (nout != NSRC) begin
      failures = failures + 1;
      $display("K=%0d SOFT=%0d: decoded %0d bits, expected %0d", K, SOFT, nout, NSRC);
    end
    checks = checks + 1;
    if (nerr == 0 || purges == 0) begin
      failures = failures + 1;
      $display("K=%0d SOFT=%0d: no channel error or no purge", K, SOFT);
    end
    $display("K=%0d SOFT=%0d T=%0d: bits=%0d channel errors=%0d purged=%0d live states=%0d.%02d of %0d", K, SOFT, T, nout,
             nerr, purges, alive_sum / nsteps, (alive_sum * 100 / nsteps) % 100, 1 << (K - 1));
    done = 1;
  end
endmodule
