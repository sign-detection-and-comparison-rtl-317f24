// tb_r_register: test of the control register R.
// Checks the reset value (all zero), that R loads on a clock edge with load
// high, and that it holds its value while load is low.  Loaded values are
// runs of ones from the most significant byte, as the register requires.
module tb_r_register;
  localparam int M = 16;
  int checks = 0;
  int failures = 0;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         load = 1'b0;
  logic [M-1:0] d = '0;
  logic [M-1:0] r;
  logic [M-1:0] model;

  r_register #(.M(M)) dut (.clk(clk), .rst_n(rst_n), .load(load), .d(d), .r(r));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s;
    #12;
    checks++;
    if (r !== '0) begin failures++; $display("FAIL reset value %h", r); end
    rst_n = 1'b1;
    model = '0;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      load = ($urandom % 3) == 0;
      s    = $urandom % (M + 1);
      d    = '0;
      for (int i = 0; i < s; i++) d[M-1-i] = 1'b1;
      @(posedge clk);
      if (load) model = d;
      #1;
      checks++;
      if (r !== model) begin failures++; $display("FAIL r=%h exp %h", r, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
