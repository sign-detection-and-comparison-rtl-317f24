// tb_pg_gen: self-checking test of the group propagate / generate generator.
// Applies random operands with the enable on and off, for K = 4 and K = 1,
// and compares every bit with the truth table of a half adder (p = sum,
// g = carry) or with zero when the group is inhibited.
module tb_pg_gen;
  int checks = 0;
  int failures = 0;

  logic       en4, en1;
  logic [3:0] x4, y4, p4, g4;
  logic [0:0] x1, y1, p1, g1;

  pg_gen #(.K(4)) dut4 (.en(en4), .x(x4), .y(y4), .p(p4), .g(g4));
  pg_gen #(.K(1)) dut1 (.en(en1), .x(x1), .y(y1), .p(p1), .g(g1));

  task automatic check_bit(input logic en, input logic xb, input logic yb,
                           input logic pb, input logic gb);
    int s;
    s = int'(xb) + int'(yb);          // half-adder sum and carry
    checks++;
    if (pb !== (en && s == 1) || gb !== (en && s == 2)) begin
      failures++;
      $display("FAIL en=%0b x=%0b y=%0b p=%0b g=%0b", en, xb, yb, pb, gb);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      en4 = (t % 3) != 0;
      x4  = 4'($urandom);
      y4  = 4'($urandom);
      en1 = $urandom % 2;
      x1  = 1'($urandom);
      y1  = 1'($urandom);
      #1;
      for (int b = 0; b < 4; b++) check_bit(en4, x4[b], y4[b], p4[b], g4[b]);
      check_bit(en1, x1[0], y1[0], p1[0], g1[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
