// tb_pmu: the path metric unit against a step-by-step model of the T-algorithm written here.
// Random branch metrics (0..2) are applied, with random gaps in in_valid. After every step the
// model's metrics, alive flags, decisions, purge count and trace-back start state are compared
// with the unit's. The model finds the optimum by searching all new metrics directly (no
// pre-computation). Counts that purging and revival both happened.
module tb_pmu;
  import vd_pkg::*;
  localparam int K = 3, T = 2, M = K - 1, NS = 1 << M;
  localparam int G0 = 'o7, G1 = 'o5;

  logic          clk = 0, rst_n = 0, in_valid = 0;
  logic [1:0]    bm [4];
  logic [NS-1:0] dec, alive;
  logic          dec_valid;
  logic [M-1:0]  best_state;
  logic [2:0]    n_purged;
  int checks = 0, failures = 0, purges = 0, revivals = 0, steps = 0;

  int rpm [NS];
  bit ral [NS];
  bit rdec [NS];
  int rnp;

  pmu #(.K(K), .G0(G0), .G1(G1), .SOFT(1'b0), .T_THRESH(T)) dut (.*);

  always #5 clk = !clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic model_step();
    int cand [NS];
    bit ok [NS];
    int mn;
    mn = 1 << 30;
    for (int sn = 0; sn < NS; sn++) begin
      int p0, p1, a, b, u;
      p0 = (sn << 1) & (NS - 1);
      p1 = p0 | 1;
      u  = (sn >> (M - 1)) & 1;
      a  = rpm[p0] + int'(bm[branch_label(p0, u[0], K, G0, G1)]);
      b  = rpm[p1] + int'(bm[branch_label(p1, u[0], K, G0, G1)]);
      ok[sn] = ral[p0] || ral[p1];
      if (ral[p0] && ral[p1]) rdec[sn] = (b < a);
      else                    rdec[sn] = ral[p1];
      cand[sn] = rdec[sn] ? b : a;
      if (ok[sn] && cand[sn] < mn) mn = cand[sn];
    end
    rnp = 0;
    for (int sn = 0; sn < NS; sn++) begin
      bit keep;
      keep = ok[sn] && (cand[sn] - mn <= T);
      if (keep) rpm[sn] = cand[sn] - mn;
      if (keep && !ral[sn]) revivals++;
      if (ok[sn] && !keep) rnp++;
      ral[sn] = keep;
    end
    purges += rnp;
  endtask

  function automatic int model_best();
    for (int s = 0; s < NS; s++) if (ral[s] && rpm[s] == 0) return s;
    return -1;
  endfunction

  initial begin
    for (int s = 0; s < NS; s++) begin rpm[s] = 0; ral[s] = (s == 0); end
    for (int c = 0; c < 4; c++) bm[c] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2000) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 4) != 0);
      for (int c = 0; c < 4; c++) bm[c] = 2'($urandom_range(0, 2));
      if (in_valid) begin
        model_step();
        steps++;
      end
      @(posedge clk); #1;
      checks++;
      if (dec_valid != in_valid) begin
        failures++;
        $display("dec_valid mismatch");
      end
      for (int s = 0; s < NS; s++) begin
        checks++;
        if (alive[s] != ral[s] || (ral[s] && int'(dut.pm[s]) != rpm[s]) ||
            (in_valid && dec[s] != rdec[s])) begin
          failures++;
          if (failures < 10)
            $display("step %0d state %0d: alive %0d/%0d pm %0d/%0d dec %0d/%0d", steps, s,
                     alive[s], ral[s], dut.pm[s], rpm[s], dec[s], rdec[s]);
        end
      end
      checks++;
      if (int'(best_state) != model_best() || (in_valid && int'(n_purged) != rnp)) begin
        failures++;
        $display("step %0d best %0d/%0d purged %0d/%0d", steps, best_state, model_best(),
                 n_purged, rnp);
      end
    end
    checks++;
    if (purges == 0 || revivals == 0) begin
      failures++;
      $display("purge or revival never happened: %0d %0d", purges, revivals);
    end
    $display("steps=%0d purged states=%0d revived states=%0d", steps, purges, revivals);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
