// tb_sd_pkg: test of the tree-size helper functions of sd_pkg.
// Compares ceil_div, tree_levels and level_width with values counted here by
// repeated multiplication: the number of levels of a k-ary tree over m leaves
// is the smallest L with k^L >= m, and level l holds ceil(m / k^l) pairs.
module tb_sd_pkg;
  import sd_pkg::*;
  int checks = 0;
  int failures = 0;

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pg_pair_t pr;
    for (int k = 2; k <= 8; k++) begin
      for (int m = 1; m <= 200; m++) begin
        int L;
        int pw;
        L  = 0;
        pw = 1;
        while (pw < m) begin pw *= k; L++; end
        checks++;
        if (tree_levels(m, k) != L) begin
          failures++;
          $display("FAIL tree_levels(%0d,%0d)=%0d exp %0d", m, k, tree_levels(m, k), L);
        end
        checks++;
        if (ceil_div(m, k) != (m / k + ((m % k) != 0))) begin
          failures++;
          $display("FAIL ceil_div(%0d,%0d)", m, k);
        end
        pw = 1;
        for (int l = 0; l <= L; l++) begin
          checks++;
          if (level_width(m, k, l) != (m + pw - 1) / pw) begin
            failures++;
            $display("FAIL level_width(%0d,%0d,%0d)", m, k, l);
          end
          pw *= k;
        end
      end
    end
    pr = '{p: 1'b1, g: 1'b0};
    checks++;
    if ($bits(pr) != 2 || pr != 2'b10) begin
      failures++;
      $display("FAIL pg_pair_t layout");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
