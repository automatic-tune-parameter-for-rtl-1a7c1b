// Two-input multiplier of the PID processor: unsigned coefficient times
// signed error.
//
// p = coef * err, combinational. coef is an unsigned AW-bit coefficient
// (Kp+Ki+Kd, Kp+2Kd or Kd, at most 10 bits), err a two's complement BW-bit
// error sample. The product is signed and AW+BW bits wide, which holds every
// result exactly. The PID processor holds two of these and shares them
// between its processing steps.
module pid_mul #(
  parameter int unsigned AW = 10,
  parameter int unsigned BW = 11
) (
  input  logic        [AW-1:0]    coef,
  input  logic signed [BW-1:0]    err,
  output logic signed [AW+BW-1:0] p
);
  always_comb p = $signed({1'b0, coef}) * err;
endmodule
