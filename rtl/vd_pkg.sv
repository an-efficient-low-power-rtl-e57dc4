// vd_pkg: constants, types and helper functions shared by the Viterbi decoder blocks.
//
// The code is a rate-1/2 feedforward convolutional code of constraint length K. The encoder
// register is {u, s}: u is the new input bit (most significant) and s the K-1 previous bits,
// newest first. Output bit 1 (sent first) is the parity of {u, s} & G0, output bit 0 the parity
// of {u, s} & G1. The next state is {u, s[K-2:1]}. A branch label is the 2-bit code symbol
// {c1, c0}; there are four labels, so the branch metric unit produces four metrics.
//
// Branch metric ranges: hard decision gives a Hamming distance 0..2; soft decision (3-bit
// symbols, ideal values 0 and 7) gives Mb* + 98 in 0..196, see bmu.sv.
package vd_pkg;

  // Read/write behaviour of one dual-port RAM port when it writes.
  typedef enum logic [1:0] {
    WRITE_FIRST = 2'd0,  // read data shows the word being written
    READ_FIRST  = 2'd1,  // read data shows the old contents of the written word
    NO_CHANGE   = 2'd2   // read data keeps its previous value during a write
  } dp_mode_e;

  // Owner of one semaphore flag of the dual-port RAM.
  typedef enum logic [1:0] {
    SEM_FREE  = 2'd0,
    SEM_LEFT  = 2'd1,
    SEM_RIGHT = 2'd2
  } sem_owner_e;

  // Soft-decision ideal values and bias (see bmu.sv).
  localparam int unsigned SOFT_Q    = 3;
  localparam int unsigned SOFT_ONE  = 7;   // ideal received value of a 1 (x0)
  localparam int unsigned SOFT_BIAS = 98;  // 2 * SOFT_ONE^2, makes Mb* non-negative

  // Bits per received code bit.
  function automatic int unsigned sym_bits(bit is_soft);
    return is_soft ? SOFT_Q : 1;
  endfunction

  // Largest branch metric and its width.
  function automatic int unsigned bm_max(bit is_soft);
    return is_soft ? 2 * SOFT_BIAS : 2;
  endfunction

  function automatic int unsigned bm_width(bit is_soft);
    return $clog2(bm_max(is_soft) + 1);
  endfunction

  // Code symbol {c1, c0} sent when input bit u enters the encoder in state s.
  function automatic logic [1:0] branch_label(int unsigned s, bit u, int unsigned k,
                                              int unsigned g0, int unsigned g1);
    int unsigned r;
    r = (int'(u) << (k - 1)) | s;
    return {^(r & g0), ^(r & g1)};
  endfunction

endpackage
