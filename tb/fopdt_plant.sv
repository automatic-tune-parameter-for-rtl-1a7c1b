// Behavioural model, for simulation only: the controlled process seen
// through the DAC, the actuator chain, the oven, the temperature sensor and
// the ADC, reduced to a first-order lag plus dead time.
//
// At every sampling tick the model advances one sampling period:
//   y <- y + (1 - exp(-1/tau)) * (offset + gain * u[k - dead] - y)
// where u is the 12-bit controller output code and y the process value in
// ADC codes; 'pv' is y rounded and limited to 0..1023. gain, tau (in
// sampling periods), dead (in sampling periods, at most 255) and offset are
// run-time inputs so that one testbench can try several processes. 'init'
// sets y to the steady state of the present input and fills the dead-time
// line with it.
module fopdt_plant (
  input  logic        clk,
  input  logic        tick,
  input  logic        init,
  input  logic [11:0] u,
  input  real         gain,
  input  real         tau,
  input  int          dead,
  input  real         offset,
  output logic [9:0]  pv
);
  real y;
  logic [11:0] line [256];
  int wp;

  function automatic logic [9:0] quant(input real v);
    if (v <= 0.0) return '0;
    if (v >= 1023.0) return 10'd1023;
    return 10'($rtoi(v + 0.5));
  endfunction

  initial begin
    y = 0.0;
    wp = 0;
    pv = '0;
    foreach (line[i]) line[i] = '0;
  end

  always @(posedge clk) begin
    if (init) begin
      y = offset + gain * real'(u);
      foreach (line[i]) line[i] = u;
      wp = 0;
      pv <= quant(y);
    end else if (tick) begin
      logic [11:0] ud;
      line[wp] = u;
      ud = line[(wp - dead + 256) % 256];
      wp = (wp + 1) % 256;
      y = y + (1.0 - $exp(-1.0 / tau)) * (offset + gain * real'(ud) - y);
      pv <= quant(y);
    end
  end
endmodule
