// tb_acs: exhaustive check of the add-compare-select element (PM_W = 3, BM_W = 2) against
// sums and comparisons worked out here, including the purged-predecessor cases.
module tb_acs;
  logic [2:0] sm0, sm1;
  logic [1:0] bm0, bm1;
  logic       ok0, ok1;
  logic [3:0] sm_new;
  logic       dec, ok_new;
  int checks = 0, failures = 0;

  acs #(.PM_W(3), .BM_W(2)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 12); v++) begin
      int a, b, e_sm;
      bit e_dec, e_ok;
      {sm0, sm1, bm0, bm1, ok0, ok1} = 12'(v);
      #1;
      a = int'(sm0) + int'(bm0);
      b = int'(sm1) + int'(bm1);
      e_ok = ok0 || ok1;
      if (ok0 && ok1) e_dec = (b < a);
      else            e_dec = ok1;
      e_sm = e_dec ? b : a;
      checks++;
      if (ok_new != e_ok || dec != e_dec || (e_ok && int'(sm_new) != e_sm)) begin
        failures++;
        if (failures < 10)
          $display("v=%0h sm_new=%0d dec=%0d ok=%0d exp %0d %0d %0d", v, sm_new, dec, ok_new,
                   e_sm, e_dec, e_ok);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
