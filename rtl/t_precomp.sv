// t_precomp: pre-computation of the optimal path metric for the T-algorithm.
//
// The T-algorithm keeps only states whose new metric is within T of the best new metric. Found
// after the ACS array, that minimum would add a full min-search to the ACS feedback loop. This
// unit obtains the same value in parallel with the ACS array:
//
//   min over new states of PM' = min over labels c of ( bm[c] + G[c] ),
//   G[c] = min of PM[s] over alive states s that have an outgoing branch labelled c.
//
// The group minima G[c] depend only on the current metrics, which are ready at the start of the
// cycle, so the long min-tree runs while the branch metrics are being formed; after the branch
// metrics only four additions and a 4-input minimum remain. The result equals the minimum the
// ACS array produces (every new metric is some PM[s] + bm[label]). Purely combinational.
//
// Computing the optimal metric ahead of the ACS follows the source description; the grouping by
// branch label (one pre-computation step) is this design's choice.
//
// Ports: pm[NS] current metrics, alive[NS], bm[4]; pm_min = minimum new metric (SW bits).
module t_precomp
  import vd_pkg::*;
#(
  parameter int unsigned K    = 3,
  parameter int unsigned G0   = 'o7,
  parameter int unsigned G1   = 'o5,
  parameter int unsigned PM_W = 2,
  parameter int unsigned BM_W = 2,
  parameter int unsigned SW   = ((PM_W > BM_W) ? PM_W : BM_W) + 1,
  localparam int unsigned NS  = 1 << (K - 1)
) (
  input  logic [PM_W-1:0] pm    [NS],
  input  logic            alive [NS],
  input  logic [BM_W-1:0] bm    [4],
  output logic [SW-1:0]   pm_min
);

  logic [PM_W-1:0] gmin [4];
  logic            gok  [4];

  // Group minima: depend on the current metrics only.
  always_comb begin
    for (int c = 0; c < 4; c++) begin
      gmin[c] = '1;
      gok[c]  = 1'b0;
    end
    for (int s = 0; s < NS; s++) begin
      for (int u = 0; u < 2; u++) begin
        logic [1:0] lab;
        lab = branch_label(s, u[0], K, G0, G1);
        if (alive[s] && (!gok[lab] || pm[s] < gmin[lab])) begin
          gmin[lab] = pm[s];
          gok[lab]  = 1'b1;
        end
      end
    end
  end

  // Final step: add the branch metrics and take the smallest of four.
  always_comb begin
    logic          found;
    logic [SW-1:0] cand;
    found  = 1'b0;
    pm_min = '0;
    for (int c = 0; c < 4; c++) begin
      cand = SW'(gmin[c]) + SW'(bm[c]);
      if (gok[c] && (!found || cand < pm_min)) begin
        pm_min = cand;
        found  = 1'b1;
      end
    end
  end

endmodule
