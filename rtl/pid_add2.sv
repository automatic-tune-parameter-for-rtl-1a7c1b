// Two-input unsigned adder of the PID processor, 10 bits wide by default.
//
// y = a + b, combinational. Used once per sample to form Kp + 2*Kd, with
// 2*Kd produced by a one-bit left shift in front of input b. An 8-bit gain
// plus a 9-bit doubled gain always fits in 10 bits, so no carry is lost.
module pid_add2 #(
  parameter int unsigned W = 10
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);
  always_comb y = a + b;
endmodule
