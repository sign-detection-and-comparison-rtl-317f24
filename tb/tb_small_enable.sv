// tb_small_enable: exhaustive test of the per-byte enable cell.
// For every input combination the expected outputs follow from the meaning of
// the signals: the byte is enabled if it is the most significant byte that
// may be nonzero (previous byte known zero, this one not) or if a byte above
// already passed its enable down; it passes the enable down if it is that
// first live byte and propagates; a byte known to be zero counts as propagate.
module tb_small_enable;
  int checks = 0;
  int failures = 0;

  logic r_prev, r_cur, q_above, p, e, p_star, q_below;

  small_enable dut (
    .r_prev(r_prev), .r_cur(r_cur), .q_above(q_above), .p(p),
    .e(e), .p_star(p_star), .q_below(q_below)
  );

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic first_live, exp_e, exp_ps, exp_q;
    for (int v = 0; v < 16; v++) begin
      {r_prev, r_cur, q_above, p} = 4'(v);
      #1;
      first_live = (r_prev == 1'b1) && (r_cur == 1'b0);
      exp_e  = first_live || q_above;
      exp_q  = q_above || (first_live && p);
      exp_ps = r_cur ? 1'b1 : p;
      checks++;
      if (e !== exp_e || q_below !== exp_q || p_star !== exp_ps) begin
        failures++;
        $display("FAIL in=%b e=%b q=%b p*=%b", 4'(v), e, q_below, p_star);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
