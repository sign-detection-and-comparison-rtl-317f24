// r_register: control register R of the small-operand comparison network.
//
// One bit per K-bit byte of the operands; bit R_i = 1 states that byte i of
// both operands of the coming comparisons is zero.  Byte 1 is the most
// significant and is held in r[M-1].  The register is loaded when the largest
// operand size of a sequence of comparisons is known and is expected to change
// rarely.  A loaded value must be a run of ones from the most significant byte
// followed by zeros (the operands are small integers); an assertion checks it.
//
// Interface: clk, active-low asynchronous reset rst_n, load with data d.
// Timing: r takes d on the rising clk edge when load is 1.  Reset clears R to
// all zeros, meaning no byte is known to be zero, which makes the network
// behave as the plain low-transition tree.  The reset value, the load port
// and the check are this design's choices; the register itself and its
// meaning follow the design.  Verilator notes that rst_n feeds both the
// asynchronous reset and the assertion's disable condition; that is intended,
// as the check is switched off while the register is held in reset.
module r_register #(
  parameter int unsigned M = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [M-1:0] d,
  output logic [M-1:0] r
);

  // True when v is 1...10...0 from its most significant bit (all zeros allowed).
  function automatic logic is_prefix(input logic [M-1:0] v);
    logic seen_zero;
    logic ok;
    seen_zero = 1'b0;
    ok        = 1'b1;
    for (int i = int'(M) - 1; i >= 0; i--) begin
      if (!v[i]) seen_zero = 1'b1;
      else if (seen_zero) ok = 1'b0;
    end
    return ok;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r <= '0;
    end else if (load) begin
      r <= d;
    end
  end

  a_prefix : assert property (@(posedge clk) disable iff (!rst_n) load |-> is_prefix(d))
    else $error("r_register: R must be ones from the top byte followed by zeros");

endmodule
