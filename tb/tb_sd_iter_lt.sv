// tb_sd_iter_lt: self-checking test of the low-transition iterative network.
//
// Starts with a worked example (a propagate run of four bits ended by a
// generate).  At the default size (53 fraction bits) it applies uniformly random operands
// and operands with long propagate chains (y = ~x over a random prefix), each
// operation followed by a clear phase with h0 = 0.  Checked: the sign against
// the sign of the integer sum x + y worked out on a wider integer; the h
// chain against the length of the most significant propagate run; that the
// clear phase leaves every h at 0.  On uniform operands the chain stops after
// one bit on average (run length m has probability 2^-(m+1)), so the mean
// number of set h's must be close to 1: this is the property that makes the
// scheme's switching independent of N.
module tb_sd_iter_lt;
  localparam int N = 53;
  int checks = 0;
  int failures = 0;

  logic         x0, y0, h0, c0, sign;
  logic [N-1:0] xf, yf;

  sd_iter_lt #(.N(N)) dut (
    .x0(x0), .y0(y0), .x_frac(xf), .y_frac(yf), .h0(h0), .c0(c0), .sign(sign)
  );

  function automatic logic [N-1:0] rnd();
    return {$urandom, $urandom};
  endfunction

  task automatic chk(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s x=%0b.%h y=%0b.%h", what, x0, xf, y0, yf);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint     chain_sum = 0;
    int         n_uniform = 0;
    int         run;
    logic [N:0] sum;
    logic       exp_sign;
    real        mean;

    // Worked example: x1..x5 = 0 0 1 1 1, y1..y5 = 1 1 0 0 1.  Bits 1-4
    // propagate, bit 5 generates, so h_1..h_4 = 1, h_5 = 0 and c0 = 1 for any
    // lower bits.
    x0 = 1'b0; y0 = 1'b1; h0 = 1'b1;
    xf = rnd(); yf = rnd();
    xf[N-1 -: 5] = 5'b00111;
    yf[N-1 -: 5] = 5'b11001;
    #1;
    chk("example chain", dut.h[N-1 -: 5] === 5'b11110);
    chk("example c0", c0 === 1'b1 && sign === 1'b0);
    h0 = 1'b0;
    #1;

    for (int t = 0; t < 20000; t++) begin
      x0 = 1'($urandom);
      y0 = 1'($urandom);
      xf = rnd();
      if (t % 4 == 3) begin
        // long chain: the top L bits propagate, the rest are random
        int L = $urandom % (N + 1);
        yf = rnd();
        for (int b = N - 1; b >= N - L; b--) yf[b] = ~xf[b];
      end else begin
        yf = rnd();
      end

      h0 = 1'b1;
      #1;
      sum      = {1'b0, xf} + {1'b0, yf};
      exp_sign = x0 ^ y0 ^ sum[N];
      chk("sign", sign === exp_sign && c0 === sum[N]);

      // run of propagating bits from the top
      run = 0;
      while (run < N && (xf[N-1-run] ^ yf[N-1-run])) run++;
      // h_i (at dut.h[N-i]) must be 1 exactly for i <= run, i < N
      for (int i = 1; i < N; i++) begin
        if (dut.h[N-i] !== (i <= run)) begin
          chk("h chain", 1'b0);
          break;
        end
      end
      checks++;
      if (t % 4 != 3) begin
        chain_sum += (run < N - 1) ? run : N - 1;
        n_uniform++;
      end

      // clear phase
      h0 = 1'b0;
      #1;
      chk("clear", dut.h[N-1:1] == '0);
    end

    mean = real'(chain_sum) / real'(n_uniform);
    $display("mean most-significant chain length on uniform operands: %f", mean);
    chk("mean chain length near 1", mean > 0.9 && mean < 1.1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
