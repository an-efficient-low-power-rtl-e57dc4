// bmu: branch metric unit.
//
// For each of the four code symbols a rate-1/2 code can send ({c1, c0} = 0..3) it measures
// how far the received pair is from that symbol. Purely combinational.
//
// Hard decision (SOFT = 0): the received pair is two bits. Each metric is the Hamming distance:
// the received pair is XORed with the expected symbol and the ones are counted (0..2).
//
// Soft decision (SOFT = 1): each received value is 3 bits, 000 = strongest 0 ... 111 =
// strongest 1, with ideal values x0 = 0 for a 0 and x0 = 7 for a 1. The squared Euclidean
// distance (x-x0)^2 + (y-y0)^2 is replaced by Mb* = (x0^2 - 2*x*x0) + (y0^2 - 2*y*y0): the
// terms x^2 and y^2 are the same for all four symbols and do not change any decision. With
// constant x0 the products are fixed multiples (0 or 14*x), so no multiplier is needed. Mb* is
// formed in two's complement (-98..98); the unit then adds the constant 98 so the metric it
// outputs is unsigned (0..196). Adding one constant to all four metrics changes no decision.
//
// The XOR / count-ones structure, the Mb* formula and the 3-bit reliability code follow the
// source description; the ideal values 0/7 and the +98 bias are this design's choice.
//
// Ports: rx = {x, y} (x is the first code bit), bm[c] = metric for expected symbol c.
module bmu
  import vd_pkg::*;
#(
  parameter bit          SOFT = 1'b0,
  localparam int unsigned Q    = sym_bits(SOFT),
  localparam int unsigned BM_W = bm_width(SOFT)
) (
  input  logic [2*Q-1:0]  rx,
  output logic [BM_W-1:0] bm [4]
);

  // Signed soft term x0^2 - 2*x*x0 for one received value.
  function automatic logic signed [9:0] soft_term(logic [Q-1:0] v, logic expect_one);
    logic signed [9:0] vv;
    vv = signed'(10'(v));
    if (expect_one) return signed'(10'(SOFT_ONE * SOFT_ONE)) - signed'(10'(2 * SOFT_ONE)) * vv;
    else            return 10'sd0;
  endfunction

  // Metric of one expected code symbol.
  function automatic logic [BM_W-1:0] metric(logic [2*Q-1:0] r, logic [1:0] code);
    logic signed [9:0] mbs;
    if (SOFT) begin
      mbs = soft_term(r[2*Q-1:Q], code[1]) + soft_term(r[Q-1:0], code[0]);
      return BM_W'(mbs + signed'(10'(SOFT_BIAS)));
    end else begin
      return BM_W'($countones(r[2*Q-1:0] ^ (2*Q)'(code)));
    end
  endfunction

  always_comb
    for (int c = 0; c < 4; c++) bm[c] = metric(rx, 2'(c));

endmodule
