// tb_t_precomp: random metrics, alive flags and branch metrics; the pre-computed optimum must
// equal the minimum over all live trellis branches of PM[s] + bm[label(s,u)], found here by
// walking every branch. Runs K = 3 (7,5) and K = 5 (23,35 octal).
module tb_t_precomp;
  import vd_pkg::*;
  localparam int unsigned NS3 = 4, NS5 = 16;
  logic [3:0] pm3 [NS3];
  logic       al3 [NS3];
  logic [3:0] pm5 [NS5];
  logic       al5 [NS5];
  logic [1:0] bm  [4];
  logic [4:0] min3, min5;
  int checks = 0, failures = 0;

  t_precomp #(.K(3), .G0('o7),  .G1('o5),  .PM_W(4), .BM_W(2)) dut3 (.pm(pm3), .alive(al3), .bm(bm), .pm_min(min3));
  t_precomp #(.K(5), .G0('o23), .G1('o35), .PM_W(4), .BM_W(2)) dut5 (.pm(pm5), .alive(al5), .bm(bm), .pm_min(min5));

  function automatic int ref_min(int k, int g0, int g1, int ns, logic [3:0] pm [], logic al []);
    int best = 1 << 30;
    for (int s = 0; s < ns; s++)
      for (int u = 0; u < 2; u++)
        if (al[s]) begin
          int v = int'(pm[s]) + int'(bm[branch_label(s, u[0], k, g0, g1)]);
          if (v < best) best = v;
        end
    return best;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] p3 [], p5 [];
    logic       a3 [], a5 [];
    p3 = new[NS3]; a3 = new[NS3]; p5 = new[NS5]; a5 = new[NS5];
    for (int it = 0; it < 3000; it++) begin
      for (int s = 0; s < NS3; s++) begin
        pm3[s] = 4'($urandom_range(0, 15)); al3[s] = ($urandom_range(0, 3) != 0);
      end
      for (int s = 0; s < NS5; s++) begin
        pm5[s] = 4'($urandom_range(0, 15)); al5[s] = ($urandom_range(0, 3) != 0);
      end
      al3[$urandom_range(0, NS3 - 1)] = 1'b1;
      al5[$urandom_range(0, NS5 - 1)] = 1'b1;
      for (int c = 0; c < 4; c++) bm[c] = 2'($urandom_range(0, 2));
      #1;
      for (int s = 0; s < NS3; s++) begin p3[s] = pm3[s]; a3[s] = al3[s]; end
      for (int s = 0; s < NS5; s++) begin p5[s] = pm5[s]; a5[s] = al5[s]; end
      checks += 2;
      if (int'(min3) != ref_min(3, 'o7, 'o5, NS3, p3, a3)) begin
        failures++;
        $display("K3 it=%0d got %0d exp %0d", it, min3, ref_min(3, 'o7, 'o5, NS3, p3, a3));
      end
      if (int'(min5) != ref_min(5, 'o23, 'o35, NS5, p5, a5)) begin
        failures++;
        $display("K5 it=%0d got %0d exp %0d", it, min5, ref_min(5, 'o23, 'o35, NS5, p5, a5));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
