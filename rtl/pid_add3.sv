// Three-input signed adder, the widest shared operator of the PID processor.
//
// y = a + b + c, all operands and the result are two's complement of width W.
// Purely combinational; the PID processor registers the result. The PID
// processor uses it for Kp+Ki+Kd, for Kd*e[n-2] + Vo[n-1] and for the final
// sum of the three terms. The specification sizes this adder at 20 bits; the
// processor instantiates it wider (see pid_processor) so that no product or
// sum can overflow.
module pid_add3 #(
  parameter int unsigned W = 20
) (
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  input  logic signed [W-1:0] c,
  output logic signed [W-1:0] y
);
  always_comb y = a + b + c;
endmodule
