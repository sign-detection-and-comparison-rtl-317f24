// tb_pg_node: exhaustive test of the k-input PG module for K = 4 and K = 2.
// The reference treats the pairs as the bits of a carry chain: G is 1 when
// some pair generates and every more significant pair propagates, and P is 1
// when all pairs propagate.  The reference scans from the most significant
// pair downwards, the opposite direction to the module.
module tb_pg_node;
  int checks = 0;
  int failures = 0;

  logic [3:0] p4, g4;
  logic       po4, go4;
  logic [1:0] p2, g2;
  logic       po2, go2;

  pg_node #(.K(4)) dut4 (.p_in(p4), .g_in(g4), .p_out(po4), .g_out(go4));
  pg_node #(.K(2)) dut2 (.p_in(p2), .g_in(g2), .p_out(po2), .g_out(go2));

  function automatic logic [1:0] ref_pg(input logic [7:0] p, input logic [7:0] g, input int k);
    logic gg;
    logic all_p;
    gg    = 1'b0;
    all_p = 1'b1;
    for (int i = k - 1; i >= 0; i--) begin
      if (all_p && g[i]) gg = 1'b1;
      all_p = all_p & p[i];
    end
    return {all_p, gg};
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] r;
    for (int v = 0; v < 256; v++) begin
      p4 = v[7:4];
      g4 = v[3:0];
      p2 = v[3:2];
      g2 = v[1:0];
      #1;
      r = ref_pg({4'b0, p4}, {4'b0, g4}, 4);
      checks++;
      if ({po4, go4} !== r) begin
        failures++;
        $display("FAIL K=4 p=%b g=%b got P=%b G=%b exp %b", p4, g4, po4, go4, r);
      end
      r = ref_pg({6'b0, p2}, {6'b0, g2}, 2);
      checks++;
      if ({po2, go2} !== r) begin
        failures++;
        $display("FAIL K=2 p=%b g=%b got P=%b G=%b exp %b", p2, g2, po2, go2, r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
