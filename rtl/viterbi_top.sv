// viterbi_top: low-power Viterbi decoder with T-algorithm pre-computation and a dual-port-RAM
// survivor memory.
//
// Decodes a rate-1/2 convolutional code (constraint length K, generators G0/G1, see vd_pkg)
// at one received symbol pair per clock:
//   rx -> bmu (4 branch metrics) -> pmu (ACS array, metric register, T-algorithm purge with the
//   optimum pre-computed by t_precomp, decision register) -> tbu (two dual-port RAM banks,
//   concurrent trace and decode pointers) -> filo_out (reorder, output register) -> out_bit.
//
// Interface: in_valid/rx accept one received pair per cycle (rx = {first bit, second bit},
// Q = 1 bit each for hard decision, 3 bits each for soft decision, 000 = strongest 0 ...
// 111 = strongest 1). out_valid/out_bit deliver the decoded bits in source order. The encoder
// is taken to start in state 0 at reset (rst_n low, synchronous).
//
// Timing: with in_valid held high, the bit encoded with the symbol accepted on edge n leaves
// on edge n + 4L + 2. The pipeline advances only with in_valid, so the last
// 4L bits of a stream are pushed out by 4L further (dummy) symbols. Output starts with the
// fourth block of L symbols after reset.
//
// The block chain, the Hamming/Mb* branch metrics, the ACS structure, the T-algorithm with a
// pre-computed optimum, the dual-port survivor memory, trace-back depth L = 5*(K-1) and the FILO
// reorder follow the source description. The code (K = 3, generators 7/5), the threshold T = 2,
// the trace-back schedule and the interface are this design's choices.
module viterbi_top
  import vd_pkg::*;
#(
  parameter int unsigned K        = 3,
  parameter int unsigned G0       = 'o7,
  parameter int unsigned G1       = 'o5,
  parameter bit          SOFT     = 1'b0,
  parameter int unsigned T_THRESH = 2,
  parameter int unsigned L        = 5 * (K - 1),
  localparam int unsigned Q       = sym_bits(SOFT)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [2*Q-1:0] rx,
  output logic         out_valid,
  output logic         out_bit
);

  localparam int unsigned M    = K - 1;
  localparam int unsigned NS   = 1 << M;
  localparam int unsigned BM_W = bm_width(SOFT);
  localparam int unsigned LW   = (L > 1) ? $clog2(L) : 1;

  logic [BM_W-1:0]        bm [4];
  logic [NS-1:0]          dec;
  logic                   dec_valid;
  logic [M-1:0]           best_state;
  logic [NS-1:0]          alive;
  logic [$clog2(NS+1)-1:0] n_purged;
  logic                   bit_valid, bit_rev;
  logic [LW-1:0]          bit_idx;

  bmu #(.SOFT(SOFT)) u_bmu (
    .rx(rx),
    .bm(bm)
  );

  pmu #(.K(K), .G0(G0), .G1(G1), .SOFT(SOFT), .T_THRESH(T_THRESH)) u_pmu (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .bm        (bm),
    .dec       (dec),
    .dec_valid (dec_valid),
    .best_state(best_state),
    .alive     (alive),
    .n_purged  (n_purged)
  );

  tbu #(.K(K), .L(L)) u_tbu (
    .clk       (clk),
    .rst_n     (rst_n),
    .dec       (dec),
    .dec_valid (dec_valid),
    .best_state(best_state),
    .bit_valid (bit_valid),
    .bit_out   (bit_rev),
    .bit_idx   (bit_idx)
  );

  filo_out #(.L(L)) u_filo (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (bit_valid),
    .in_bit   (bit_rev),
    .in_idx   (bit_idx),
    .out_valid(out_valid),
    .out_bit  (out_bit)
  );

endmodule
