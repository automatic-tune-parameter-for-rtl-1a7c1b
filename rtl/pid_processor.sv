// Digital PID processor, velocity (incremental) form.
//
// Each sample computes
//   Vo[n] = Vo[n-1] + (Kp+Ki+Kd)*e[n] - (Kp+2Kd)*e[n-1] + Kd*e[n-2],
//   e[n]  = SP - PV,
// where Ki = Kp*dT/Ti and Kd = Kp*Td/dT are already folded into the gain
// inputs. The equation is evaluated in three processes that share one
// 3-input adder, one 2-input adder and two multipliers, as in the original
// architecture:
//   process 1: Kp+Ki+Kd (3-input adder), Kp+2Kd (2-input adder, Kd shifted
//              left by one), Kd*e[n-2] (multiplier B)
//   process 2: (Kp+Ki+Kd)*e[n] (multiplier A), (Kp+2Kd)*e[n-1]
//              (multiplier B), Kd*e[n-2] + Vo[n-1] (3-input adder, third
//              input 0)
//   process 3: the three terms summed into Vo[n] (3-input adder)
//
// Interface and timing: a one-cycle 'start' in the idle state samples SP, PV
// and the gains and forms e[n]; processes 1, 2 and 3 follow in the next three
// cycles, and 'done' pulses in the cycle in which 'vo' takes the new value,
// four cycles after 'start'. 'busy' is high from the cycle after 'start'
// until 'done'. 'preset' (idle only) loads Vo[n-1] with 'preset_val' and
// clears the error history, for a bumpless hand-over from the step test.
//
// Design choices beyond the specification: gains are unsigned with GAIN_FRAC
// fractional bits; Vo[n-1] is kept internally with the same GAIN_FRAC extra
// bits so that small increments accumulate instead of being truncated away;
// the accumulator saturates at 0 and at full scale. The shared 3-input adder
// is ADD_W = 22 bits wide instead of the 20 bits of the specification,
// because (Kp+Ki+Kd)*e[n] alone can need 21 signed bits when e[n] spans
// the full +-1023.
module pid_processor
  import pid_pkg::*;
#(
  parameter int unsigned ADD_W = 22
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [PV_W-1:0]    sp,
  input  logic [PV_W-1:0]    pv,
  input  logic [GAIN_W-1:0]  kp,
  input  logic [GAIN_W-1:0]  ki,
  input  logic [GAIN_W-1:0]  kd,
  input  logic               preset,
  input  logic [VO_W-1:0]    preset_val,
  output logic [VO_W-1:0]    vo,
  output logic               busy,
  output logic               done
);
  localparam int unsigned ACC_W  = VO_W + GAIN_FRAC;
  localparam int unsigned PROD_W = COEF_W + ERR_W;
  localparam logic signed [ADD_W-1:0] ACC_MAX = ADD_W'((1 << ACC_W) - 1);

  typedef enum logic [1:0] {S_IDLE, S_P1, S_P2, S_P3} state_e;
  state_e state;

  logic [GAIN_W-1:0]        kp_r, ki_r, kd_r;
  logic signed [ERR_W-1:0]  e0, e1, e2;          // e[n], e[n-1], e[n-2]
  logic [ACC_W-1:0]         acc;                 // Vo[n-1] with fraction
  logic [COEF_W-1:0]        ksum_r, k2_r;        // Kp+Ki+Kd, Kp+2Kd
  logic signed [PROD_W-1:0] pa_r, pb_r, pc_r;    // the three products
  logic signed [ADD_W-1:0]  q_r;                 // Kd*e[n-2] + Vo[n-1]

  // Shared operator inputs, steered by the process number
  logic signed [ADD_W-1:0]  a3_a, a3_b, a3_c, a3_y;
  logic [COEF_W-1:0]        a2_a, a2_b, a2_y;
  logic [COEF_W-1:0]        ma_c, mb_c;
  logic signed [ERR_W-1:0]  ma_e, mb_e;
  logic signed [PROD_W-1:0] ma_p, mb_p;

  pid_add3 #(.W(ADD_W)) u_add3 (.a(a3_a), .b(a3_b), .c(a3_c), .y(a3_y));
  pid_add2 #(.W(COEF_W)) u_add2 (.a(a2_a), .b(a2_b), .y(a2_y));
  pid_mul #(.AW(COEF_W), .BW(ERR_W)) u_mul_a (.coef(ma_c), .err(ma_e), .p(ma_p));
  pid_mul #(.AW(COEF_W), .BW(ERR_W)) u_mul_b (.coef(mb_c), .err(mb_e), .p(mb_p));

  always_comb begin
    a3_a = '0; a3_b = '0; a3_c = '0;
    a2_a = COEF_W'(kp_r);
    a2_b = COEF_W'({kd_r, 1'b0});               // shift left: 2*Kd
    ma_c = ksum_r; ma_e = e0;
    mb_c = COEF_W'(kd_r); mb_e = e2;
    unique case (state)
      S_P1: begin
        a3_a = ADD_W'(kp_r); a3_b = ADD_W'(ki_r); a3_c = ADD_W'(kd_r);
      end
      S_P2: begin
        mb_c = k2_r; mb_e = e1;
        a3_a = ADD_W'(pc_r); a3_b = ADD_W'(acc); a3_c = '0;
      end
      S_P3: begin
        a3_a = ADD_W'(pa_r); a3_b = -ADD_W'(pb_r); a3_c = q_r;
      end
      default: ;
    endcase
  end

  logic signed [PV_W:0] sp_s, pv_s;
  assign sp_s = $signed({1'b0, sp});
  assign pv_s = $signed({1'b0, pv});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      kp_r   <= '0; ki_r <= '0; kd_r <= '0;
      e0     <= '0; e1 <= '0; e2 <= '0;
      acc    <= '0;
      ksum_r <= '0; k2_r <= '0;
      pa_r   <= '0; pb_r <= '0; pc_r <= '0;
      q_r    <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (preset) begin
            acc <= {preset_val, {GAIN_FRAC{1'b0}}};
            e1  <= '0;
            e2  <= '0;
          end else if (start) begin
            kp_r  <= kp; ki_r <= ki; kd_r <= kd;
            e0    <= sp_s - pv_s;
            state <= S_P1;
          end
        end
        S_P1: begin
          ksum_r <= a3_y[COEF_W-1:0];
          k2_r   <= a2_y;
          pc_r   <= mb_p;
          state  <= S_P2;
        end
        S_P2: begin
          pa_r  <= ma_p;
          pb_r  <= mb_p;
          q_r   <= a3_y;
          state <= S_P3;
        end
        S_P3: begin
          if (a3_y < 0)            acc <= '0;
          else if (a3_y > ACC_MAX) acc <= '1;
          else                     acc <= a3_y[ACC_W-1:0];
          e2    <= e1;
          e1    <= e0;
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A new sample may only start once the previous one is finished, and
  // 'done' is a single-clock pulse.
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy)
    else $error("pid_processor: start while busy");
  a_done_pulse: assert property (@(posedge clk) disable iff (!rst_n) done |=> !done)
    else $error("pid_processor: done longer than one clock");

  assign vo   = acc[ACC_W-1:GAIN_FRAC];
  assign busy = (state != S_IDLE);
endmodule
