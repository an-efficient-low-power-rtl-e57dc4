// tbu: survivor memory and trace-back unit on two dual-port RAM banks.
//
// Every decision column (one bit per state, from the path metric unit) is written into the
// survivor memory; trace-back walks the columns backwards from a start state, each step
// s_prev = {s[K-3:0], d[s]}, and the decoded bit of a column is the top bit of its state.
//
// Columns are grouped in blocks of L (trace-back depth). Block q goes to bank q mod 2, half
// (q div 2) mod 2, so each bank holds 2L words and four blocks are stored. While block q is
// written (L steps), two pointers run concurrently on the other bank, one per port:
//   * trace pointer (left port): reads block q-1 from its last column down, starting at the
//     best state captured when block q-1 was complete. After L steps it has reached the state
//     at the end of block q-2 and hands it to the decode pointer.
//   * decode pointer (right port): reads block q-3 from its last column down, starting at the
//     state handed over one period earlier, and emits one decoded bit per step.
// So one column is written and two are read every step: the written bank uses its left port
// to write, the other bank serves both pointers. Decoded bits come out last column first,
// with their column index; filo_out puts them back in order.
//
// Timing: everything advances on dec_valid (one step per column). RAM reads are synchronous,
// so data read in one step is used in the next; the state handed over at the start of a period
// uses the last read of the previous one. bit_valid/bit_out/bit_idx are registered and valid
// from the fourth block on. A column written at step n leaves as a decoded bit at step n + 3L
// plus (L-1-2*idx), i.e. within the block 3L..4L-1 steps later.
//
// Trace-back depth L = 5*(K-1) and the dual-port survivor memory follow the source
// description; the block schedule and bank mapping are this design's choice.
module tbu
  import vd_pkg::*;
#(
  parameter int unsigned K = 3,
  parameter int unsigned L = 5 * (K - 1),
  localparam int unsigned M  = K - 1,
  localparam int unsigned NS = 1 << M,
  localparam int unsigned LW = (L > 1) ? $clog2(L) : 1,
  localparam int unsigned AW = $clog2(2 * L)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [NS-1:0] dec,
  input  logic          dec_valid,
  input  logic [M-1:0]  best_state,
  output logic          bit_valid,
  output logic          bit_out,
  output logic [LW-1:0] bit_idx
);

  logic [LW-1:0] step;        // column being written in the current block
  logic [1:0]    blk;         // current block number mod 4
  logic [1:0]    nfull;       // completed blocks, saturating at 3
  logic [M-1:0]  tstate;      // trace pointer state (state of the column read last step)
  logic [M-1:0]  dstate;      // decode pointer state
  logic [M-1:0]  tb_start;    // best state at the end of the last completed block
  logic          rbank_q;     // bank the pointers read in the last step

  logic          wbank, rbank;
  logic [AW-1:0] waddr, taddr, daddr;
  logic [LW-1:0] rcol;

  // Per-bank port signals.
  logic          l_en [2], l_we [2], r_en [2];
  logic [AW-1:0] l_addr [2], r_addr [2];
  logic [NS-1:0] l_rdata [2], r_rdata [2];
  logic          l_busy [2], r_busy [2], l_int [2], r_int [2];
  logic [7:0]    l_sem_own [2], r_sem_own [2];

  logic [1:0]    tblk, dblk;
  logic [NS-1:0] rd_t, rd_d;
  logic [M-1:0]  t_pred, d_pred, tcur, dcur;

  always_comb begin
    wbank = blk[0];
    rbank = !blk[0];
    tblk  = blk - 2'd1;
    dblk  = blk - 2'd3;
    rcol  = LW'(L - 1) - step;
    waddr = AW'(blk[1]  ? L : 0) + AW'(step);
    taddr = AW'(tblk[1] ? L : 0) + AW'(rcol);
    daddr = AW'(dblk[1] ? L : 0) + AW'(rcol);
    for (int b = 0; b < 2; b++) begin
      l_en[b]   = dec_valid;
      l_we[b]   = (b == int'(wbank));
      l_addr[b] = (b == int'(wbank)) ? waddr : taddr;
      r_en[b]   = dec_valid && (b == int'(rbank));
      r_addr[b] = daddr;
    end
  end

  for (genvar b = 0; b < 2; b++) begin : g_bank
    dpram #(.DW(NS), .DEPTH(2 * L), .L_MODE(READ_FIRST), .R_MODE(READ_FIRST)) u_ram (
      .clk      (clk),
      .rst_n    (rst_n),
      .l_en     (l_en[b]),
      .l_we     (l_we[b]),
      .l_addr   (l_addr[b]),
      .l_wdata  (dec),
      .l_rdata  (l_rdata[b]),
      .l_busy   (l_busy[b]),
      .l_int    (l_int[b]),
      .l_sem_req(1'b0),
      .l_sem_rel(1'b0),
      .l_sem_idx(3'd0),
      .l_sem_own(l_sem_own[b]),
      .r_en     (r_en[b]),
      .r_we     (1'b0),
      .r_addr   (r_addr[b]),
      .r_wdata  ('0),
      .r_rdata  (r_rdata[b]),
      .r_busy   (r_busy[b]),
      .r_int    (r_int[b]),
      .r_sem_req(1'b0),
      .r_sem_rel(1'b0),
      .r_sem_idx(3'd0),
      .r_sem_own(r_sem_own[b])
    );
  end

  // Trace-back steps on the data read in the previous step.
  always_comb begin
    rd_t   = l_rdata[rbank_q];
    rd_d   = r_rdata[rbank_q];
    t_pred = (M > 1) ? M'({tstate, rd_t[tstate]}) : M'(rd_t[tstate]);
    d_pred = (M > 1) ? M'({dstate, rd_d[dstate]}) : M'(rd_d[dstate]);
    tcur   = (step == '0) ? tb_start : t_pred;
    dcur   = (step == '0) ? t_pred   : d_pred;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      step      <= '0;
      blk       <= '0;
      nfull     <= '0;
      tstate    <= '0;
      dstate    <= '0;
      tb_start  <= '0;
      rbank_q   <= 1'b0;
      bit_valid <= 1'b0;
      bit_out   <= 1'b0;
      bit_idx   <= '0;
    end else begin
      bit_valid <= dec_valid && (nfull == 2'd3);
      if (dec_valid) begin
        tstate  <= tcur;
        dstate  <= dcur;
        rbank_q <= rbank;
        bit_out <= dcur[M-1];
        bit_idx <= rcol;
        if (step == LW'(L - 1)) begin
          step     <= '0;
          blk      <= blk + 2'd1;
          tb_start <= best_state;
          if (nfull != 2'd3) nfull <= nfull + 2'd1;
        end else begin
          step <= step + 1'b1;
        end
      end
    end
  end

  // The two banks never see a port collision in this schedule.
  a_no_busy: assert property (@(posedge clk) disable iff (!rst_n)
                              !(r_busy[0] || r_busy[1] || l_busy[0] || l_busy[1]))
    else $error("tbu: survivor memory port collision");

endmodule
