// acs: add-compare-select element.
//
// Two adders form the partial path metrics sm0+bm0 and sm1+bm1 of the two branches entering a
// trellis state, a comparator picks the smaller, and a selector passes it on as the state's new
// metric. The comparator output is the decision bit recorded in the survivor memory
// (1 = branch 1 chosen). Purely combinational.
//
// The T-algorithm can purge states, so each input carries a "still alive" flag: a purged
// predecessor is never selected, and the new state is alive only if one of its predecessors is.
// Ties go to branch 0. The adder/compare/select structure follows the source description; the
// alive flags and the tie rule are this design's choice.
//
// Ports: sm0/sm1 = predecessor metrics (PM_W bits), bm0/bm1 = branch metrics (BM_W bits),
// ok0/ok1 = predecessor alive; sm_new (SW bits), dec, ok_new.
module acs #(
  parameter int unsigned PM_W = 3,
  parameter int unsigned BM_W = 2,
  parameter int unsigned SW   = ((PM_W > BM_W) ? PM_W : BM_W) + 1
) (
  input  logic [PM_W-1:0] sm0,
  input  logic [PM_W-1:0] sm1,
  input  logic [BM_W-1:0] bm0,
  input  logic [BM_W-1:0] bm1,
  input  logic            ok0,
  input  logic            ok1,
  output logic [SW-1:0]   sm_new,
  output logic            dec,
  output logic            ok_new
);

  logic [SW-1:0] p0, p1;

  always_comb begin
    p0     = SW'(sm0) + SW'(bm0);
    p1     = SW'(sm1) + SW'(bm1);
    dec    = ok1 && (!ok0 || (p1 < p0));
    sm_new = dec ? p1 : p0;
    ok_new = ok0 || ok1;
  end

endmodule
