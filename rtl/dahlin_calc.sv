// Process model and Dahlin PID parameters from the step-test timings.
//
// Inputs are the step-test results, all times counted in sampling periods:
// dead time t0, t1 (response at 28.3 % of its final change), t2 (at 63.2 %),
// the steady-state change dcs of the process variable and the step size dm
// applied to the controller output. From them:
//   tau  = 1.5 * (t2 - t1)                       time constant
//   K    = dcs / dm                              steady-state gain
//   mode = PID if t0 > tau/4, otherwise PI
//   Kp   = tau / (K * (tau_c + t0)), tau_c = t0  Dahlin, closed-loop lag = t0
//   Ti   = tau,  Td = t0/2 (PID mode only)
// and, because the sampling period is the time unit,
//   Ki = Kp / Ti = dm / (2*t0*dcs)
//   Kd = Kp * Td = 3*(t2-t1)*dm / (8*dcs)       (0 in PI mode).
// Each gain is formed as one quotient of integers, which keeps full precision,
// and scaled by 2^GAIN_FRAC into the PID processor's gain format, rounded
// down and saturated at the 8-bit maximum. 'k_gain' is K in unsigned Q8.8,
// saturated. t0 and t2 - t1 below 1 are taken as 1.
//
// Interface and timing: 'start' samples the inputs; four divisions on one
// shared serial divider follow (about 4 * 34 cycles), then 'done' pulses with
// all outputs valid; they hold until the next 'start'. The formulas and the
// PI/PID rule follow the Dahlin tuning method; the integer forms, the
// fixed-point formats and the limits are this design's choices.
module dahlin_calc
  import pid_pkg::*;
#(
  parameter int unsigned TW = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [TW-1:0]     t0,
  input  logic [TW-1:0]     t1,
  input  logic [TW-1:0]     t2,
  input  logic [PV_W-1:0]   dcs,
  input  logic [VO_W-1:0]   dm,
  output logic [GAIN_W-1:0] kp,
  output logic [GAIN_W-1:0] ki,
  output logic [GAIN_W-1:0] kd,
  output tune_mode_e        mode,
  output logic [TW:0]       tau,
  output logic [15:0]       k_gain,
  output logic              busy,
  output logic              done
);
  localparam int unsigned DW = 32;

  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_WAIT} state_e;
  state_e     state;
  logic [1:0] idx;        // 0: K, 1: Kp, 2: Ki, 3: Kd

  logic [TW-1:0]   t0e;
  logic [TW+1:0]   tau3;  // 3*(t2-t1) = 2*tau
  logic [PV_W-1:0] dcs_r;
  logic [VO_W-1:0] dm_r;

  logic [DW-1:0] num, den, quo;
  logic          div_start, div_busy, div_done;

  seq_divider #(.W(DW)) u_div (
    .clk, .rst_n, .start(div_start), .num, .den,
    .quo, .busy(div_busy), .done(div_done)
  );

  always_comb begin
    unique case (idx)
      2'd0: begin num = DW'(dcs_r) << 8;                          den = DW'(dm_r); end
      2'd1: begin num = (DW'(tau3) * DW'(dm_r)) << GAIN_FRAC;     den = DW'(t0e) * DW'(dcs_r) * 4; end
      2'd2: begin num = DW'(dm_r) << GAIN_FRAC;                   den = DW'(t0e) * DW'(dcs_r) * 2; end
      default: begin num = (DW'(tau3) * DW'(dm_r)) << GAIN_FRAC;  den = DW'(dcs_r) * 8; end
    endcase
  end

  function automatic logic [GAIN_W-1:0] sat_gain(input logic [DW-1:0] q);
    return (q > DW'({GAIN_W{1'b1}})) ? '1 : q[GAIN_W-1:0];
  endfunction

  assign div_start = (state == S_ISSUE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; idx <= '0;
      t0e <= '0; tau3 <= '0; dcs_r <= '0; dm_r <= '0;
      kp <= '0; ki <= '0; kd <= '0; mode <= MODE_PI; tau <= '0; k_gain <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          automatic logic [TW-1:0] d = (t2 > t1) ? t2 - t1 : TW'(1);
          automatic logic [TW-1:0] z = (t0 != '0) ? t0 : TW'(1);
          t0e   <= z;
          tau3  <= (TW+2)'(d) * 3;
          tau   <= (TW+1)'(((TW+2)'(d) * 3) >> 1);
          mode  <= ((TW+3)'(z) * 8 > (TW+3)'(d) * 3) ? MODE_PID : MODE_PI;
          dcs_r <= dcs;
          dm_r  <= dm;
          idx   <= '0;
          state <= S_ISSUE;
        end
        S_ISSUE: state <= S_WAIT;
        S_WAIT: if (div_done) begin
          unique case (idx)
            2'd0: k_gain <= (quo > 32'hFFFF) ? 16'hFFFF : quo[15:0];
            2'd1: kp <= sat_gain(quo);
            2'd2: ki <= sat_gain(quo);
            default: kd <= (mode == MODE_PID) ? sat_gain(quo) : '0;
          endcase
          if (idx == 2'd3) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            idx   <= idx + 2'd1;
            state <= S_ISSUE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE) || div_busy;
endmodule
