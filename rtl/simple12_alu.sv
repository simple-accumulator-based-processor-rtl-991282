// simple12_alu -- the Simple12 arithmetic/logic unit.
//
// Combinational. The b operand is optionally inverted (binv), then one of
// three functions is selected by fn: a AND b', a OR b', or a + b' + cin.
// With binv=1 and cin=1 the adder computes a - b (two's complement); with
// a=0, b=PC and cin=1 it computes PC+1, which is how the processor
// increments its program counter without a separate incrementer. The zero
// flag is high when the W-bit result is all zeros.
//
// The control code (b-invert, carry-in, op1, op0) and the zero flag follow
// the processor description. Function code 11 is not used by the processor;
// here it behaves like the adder.
module simple12_alu
  import simple12_pkg::*;
#(
  parameter int W = DATA_W
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  alu_ctl_t     ctl,
  output logic [W-1:0] r,
  output logic         zero
);

  logic [W-1:0] b_eff;

  always_comb begin
    b_eff = ctl.binv ? ~b : b;
    unique case (ctl.fn)
      FN_AND:  r = a & b_eff;
      FN_OR:   r = a | b_eff;
      default: r = a + b_eff + W'(ctl.cin);
    endcase
    zero = (r == '0);
  end

endmodule
