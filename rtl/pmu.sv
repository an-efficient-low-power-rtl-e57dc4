// pmu: path metric unit with T-algorithm purging.
//
// One ACS element per trellis state (NS = 2^(K-1)), wired by the code's trellis: new state
// s' = {u, s[K-2:1]} is reached from the two states {s'[K-3:0], b}, b = 0/1, with input bit
// u = s'[K-2]; the decision bit recorded for s' is b. The current metrics sit in the metric
// register. On every accepted symbol (in_valid) the unit
//   1. adds, compares and selects for all states (acs),
//   2. obtains the best new metric from the pre-computation unit (t_precomp), in parallel,
//   3. purges every state whose new metric exceeds best + T_THRESH (T-algorithm),
//   4. stores the surviving metrics minus the best one, so the best state always has metric 0
//      and live metrics stay in 0..T_THRESH, which fixes the register width,
//   5. registers the NS decision bits ("register enhancement") for the survivor memory.
// A purged state keeps its old register contents (its enable is off), is ignored by the ACS of
// its successors and comes back to life when a live predecessor reaches it within T.
//
// Timing: metrics, alive flags and dec are updated on the clock edge that accepts a symbol;
// dec_valid is high for the one following cycle. best_state is combinational from the
// registers: the lowest-numbered live state of metric 0, the trace-back start point. Reset
// (synchronous, active low) makes state 0 live with metric 0 and purges all others, i.e. the
// encoder is taken to start in state 0.
//
// The ACS structure, metric register and T-algorithm with a pre-computed optimum follow the
// source description; the threshold value, normalisation, purge bookkeeping and reset state are
// this design's choices. n_purged counts the states dropped by the last step, for observation.
module pmu
  import vd_pkg::*;
#(
  parameter int unsigned K        = 3,
  parameter int unsigned G0       = 'o7,
  parameter int unsigned G1       = 'o5,
  parameter bit          SOFT     = 1'b0,
  parameter int unsigned T_THRESH = 2,
  localparam int unsigned M    = K - 1,
  localparam int unsigned NS   = 1 << M,
  localparam int unsigned BM_W = bm_width(SOFT),
  localparam int unsigned PM_W = $clog2(T_THRESH + 1),
  localparam int unsigned SW   = ((PM_W > BM_W) ? PM_W : BM_W) + 1,
  localparam int unsigned CW   = $clog2(NS + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic [BM_W-1:0] bm [4],
  output logic [NS-1:0]   dec,
  output logic            dec_valid,
  output logic [M-1:0]    best_state,
  output logic [NS-1:0]   alive,
  output logic [CW-1:0]   n_purged
);

  logic [PM_W-1:0] pm       [NS];
  logic            alive_a  [NS];
  logic [SW-1:0]   sm_new   [NS];
  logic            dec_new  [NS];
  logic            ok_new   [NS];
  logic [SW-1:0]   pm_min;
  logic [SW-1:0]   norm     [NS];
  logic            keep     [NS];

  always_comb
    for (int s = 0; s < NS; s++) alive_a[s] = alive[s];

  // ACS array wired by the trellis.
  for (genvar sn = 0; sn < NS; sn++) begin : g_acs
    localparam int unsigned P0  = ((sn << 1) & (NS - 1));
    localparam int unsigned P1  = P0 | 1;
    localparam bit          U   = 1'((sn >> (M - 1)) & 1);
    localparam logic [1:0]  LB0 = branch_label(P0, U, K, G0, G1);
    localparam logic [1:0]  LB1 = branch_label(P1, U, K, G0, G1);
    acs #(.PM_W(PM_W), .BM_W(BM_W), .SW(SW)) u_acs (
      .sm0   (pm[P0]),
      .sm1   (pm[P1]),
      .bm0   (bm[LB0]),
      .bm1   (bm[LB1]),
      .ok0   (alive[P0]),
      .ok1   (alive[P1]),
      .sm_new(sm_new[sn]),
      .dec   (dec_new[sn]),
      .ok_new(ok_new[sn])
    );
  end

  // Optimal new metric, computed alongside the ACS array.
  t_precomp #(.K(K), .G0(G0), .G1(G1), .PM_W(PM_W), .BM_W(BM_W), .SW(SW)) u_pre (
    .pm    (pm),
    .alive (alive_a),
    .bm    (bm),
    .pm_min(pm_min)
  );

  // T-algorithm purge and normalisation.
  always_comb begin
    for (int s = 0; s < NS; s++) begin
      norm[s] = sm_new[s] - pm_min;
      keep[s] = ok_new[s] && (norm[s] <= SW'(T_THRESH));
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int s = 0; s < NS; s++) begin
        pm[s]    <= '0;
        alive[s] <= (s == 0);
      end
      dec       <= '0;
      dec_valid <= 1'b0;
      n_purged  <= '0;
    end else begin
      dec_valid <= in_valid;
      if (in_valid) begin
        logic [CW-1:0] np;
        np = '0;
        for (int s = 0; s < NS; s++) begin
          alive[s] <= keep[s];
          dec[s]   <= dec_new[s];
          if (keep[s]) pm[s] <= PM_W'(norm[s]);
          if (ok_new[s] && !keep[s]) np = np + 1'b1;
        end
        n_purged <= np;
      end
    end
  end

  // Trace-back start: lowest live state whose metric equals the (normalised) optimum 0.
  always_comb begin
    best_state = '0;
    for (int s = NS - 1; s >= 0; s--)
      if (alive[s] && pm[s] == '0) best_state = M'(s);
  end

  // The optimum always survives, so at least one state is alive.
  a_one_alive: assert property (@(posedge clk) disable iff (!rst_n) alive != '0)
    else $error("pmu: all states purged");

endmodule
