// Steady-state predictor by Newton divided-difference extrapolation.
//
// Keeps a sliding window of the last three samples x0, x1, x2 (oldest
// first), taken at equal spacing. With equal spacing the second-order Newton
// polynomial through them, evaluated one and two spacings beyond x2, is
//   x3 = x0 - 3*x1 + 3*x2
//   x4 = 3*x0 - 8*x1 + 6*x2.
// While x4 > x3 the response is still rising; once x3 >= x4 the predicted
// curve has levelled off and x3 is taken as the steady-state value. Each new
// sample drops the oldest one, so the test is repeated on (x1, x2, x3), and so
// on, until it succeeds.
//
// Interface and timing: 'clear' empties the window. A sample on 'x' with
// 'x_valid' enters the window; one cycle later 'res_valid' pulses with 'p3',
// 'p4' and 'settled' (x3 >= x4) if the window then holds three samples.
// The extrapolation rule and the settle test follow the original method; the
// equal spacing and the fixed-point forms above are this design's reading.
module newton_extrapolator #(
  parameter int unsigned XW = 10,
  parameter int unsigned PW = XW + 5
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 x_valid,
  input  logic [XW-1:0]        x,
  output logic                 res_valid,
  output logic signed [PW-1:0] p3,
  output logic signed [PW-1:0] p4,
  output logic                 settled
);
  logic [XW-1:0] w0, w1, w2;
  logic [1:0]    fill;
  logic          new_s;

  logic signed [PW-1:0] s0, s1, s2, p3_c, p4_c;
  assign s0   = PW'(w0);
  assign s1   = PW'(w1);
  assign s2   = PW'(w2);
  assign p3_c = s0 - 3 * s1 + 3 * s2;
  assign p4_c = 3 * s0 - 8 * s1 + 6 * s2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w0 <= '0; w1 <= '0; w2 <= '0;
      fill  <= '0;
      new_s <= 1'b0;
    end else if (clear) begin
      fill  <= '0;
      new_s <= 1'b0;
    end else begin
      new_s <= x_valid;
      if (x_valid) begin
        w0 <= w1;
        w1 <= w2;
        w2 <= x;
        if (fill != 2'd3) fill <= fill + 2'd1;
      end
    end
  end

  assign res_valid = new_s && (fill == 2'd3);
  assign p3        = p3_c;
  assign p4        = p4_c;
  assign settled   = res_valid && (p3_c >= p4_c);
endmodule
