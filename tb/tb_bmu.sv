// tb_bmu: exhaustive check of the branch metric unit in both modes.
// Hard mode: every received pair against the Hamming distance to each code symbol.
// Soft mode: every pair of 3-bit values against (x-x0)^2 + (y-y0)^2 - x^2 - y^2 + 98, with
// x0, y0 in {0, 7}, computed here with integer arithmetic.
module tb_bmu;
  logic [1:0] rx_h;
  logic [5:0] rx_s;
  logic [1:0] bm_h [4];
  logic [7:0] bm_s [4];
  int checks = 0, failures = 0;

  bmu #(.SOFT(1'b0)) dut_h (.rx(rx_h), .bm(bm_h));
  bmu #(.SOFT(1'b1)) dut_s (.rx(rx_s), .bm(bm_s));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 4; r++) begin
      rx_h = 2'(r);
      #1;
      for (int c = 0; c < 4; c++) begin
        int exp_v;
        exp_v = ((r >> 1) & 1 ^ (c >> 1) & 1) + ((r & 1) ^ (c & 1));
        checks++;
        if (int'(bm_h[c]) != exp_v) begin
          failures++;
          $display("hard rx=%0d c=%0d bm=%0d exp=%0d", r, c, bm_h[c], exp_v);
        end
      end
    end
    for (int x = 0; x < 8; x++) begin
      for (int y = 0; y < 8; y++) begin
        rx_s = 6'((x << 3) | y);
        #1;
        for (int c = 0; c < 4; c++) begin
          int x0, y0, exp_v;
          x0 = (((c >> 1) & 1) != 0) ? 7 : 0;
          y0 = ((c & 1) != 0) ? 7 : 0;
          exp_v = (x - x0) * (x - x0) + (y - y0) * (y - y0) - x * x - y * y + 98;
          checks++;
          if (int'(bm_s[c]) != exp_v) begin
            failures++;
            $display("soft x=%0d y=%0d c=%0d bm=%0d exp=%0d", x, y, c, bm_s[c], exp_v);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
