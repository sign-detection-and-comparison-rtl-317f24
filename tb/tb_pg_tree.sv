// tb_pg_tree: test of the k-ary PG tree at several shapes.
// Shapes: 15 groups with k = 4 (the default, a partial level), 16 groups
// with k = 4 (a full tree), 7 groups with k = 2 and a single group.  Inputs
// are random pairs, biased towards propagates so that long chains occur.  The
// reference is the carry of the whole chain, found by scanning the pairs from
// the most significant one.
module tb_pg_tree;
  int checks = 0;
  int failures = 0;

  logic [14:0] pa, ga;  logic goa;
  logic [15:0] pb, gb;  logic gob;
  logic [6:0]  pc, gc;  logic goc;
  logic [0:0]  pd, gd;  logic god;

  pg_tree #(.K(4), .M(15)) dut_a (.p_in(pa), .g_in(ga), .g_out(goa));
  pg_tree #(.K(4), .M(16)) dut_b (.p_in(pb), .g_in(gb), .g_out(gob));
  pg_tree #(.K(2), .M(7))  dut_c (.p_in(pc), .g_in(gc), .g_out(goc));
  pg_tree #(.K(4), .M(1))  dut_d (.p_in(pd), .g_in(gd), .g_out(god));

  function automatic logic ref_g(input logic [15:0] p, input logic [15:0] g, input int m);
    for (int i = m - 1; i >= 0; i--) begin
      if (g[i]) return 1'b1;
      if (!p[i]) return 1'b0;
    end
    return 1'b0;
  endfunction

  task automatic chk(input string name, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %b exp %b", name, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] rp, rg;
    int          ones = 0;
    for (int t = 0; t < 5000; t++) begin
      // p is 1 with probability 7/8, g with probability 1/8
      for (int i = 0; i < 16; i++) begin
        rp[i] = ($urandom % 8) != 0;
        rg[i] = ($urandom % 8) == 0;
      end
      pa = rp[14:0]; ga = rg[14:0];
      pb = rp;       gb = rg;
      pc = rp[6:0];  gc = rg[6:0];
      pd = rp[0:0];  gd = rg[0:0];
      #1;
      chk("M15", goa, ref_g(rp, rg, 15));
      chk("M16", gob, ref_g(rp, rg, 16));
      chk("M7",  goc, ref_g(rp, rg, 7));
      chk("M1",  god, ref_g(rp, rg, 1));
      if (goa) ones++;
    end
    // the tests must see both values of the carry
    checks++;
    if (ones == 0 || ones == 5000) begin
      failures++;
      $display("FAIL carry never toggled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
