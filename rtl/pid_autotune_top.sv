// Auto-tuning digital PID controller: the logic between the process ADC and
// the output DAC.
//
// A sampling timebase paces both halves of the design. In tuning, the
// auto-tuner drives the output: it applies a step, records and analyses the
// process response and proposes Dahlin PI or PID gains. Once the operator
// accepts them ('accept'), they are copied into the gain registers and the
// PID processor's Vo[n-1] is preset to the step-test output, so closed-loop
// control starts where the test left the actuator. Gains can also be
// written by hand ('gain_we', outside tuning). With 'ctrl_en' high and no
// tuning run active, every sampling tick starts one PID computation.
//
// Output selection: 'vo' is the auto-tuner's output from 'tune_start' until
// the run is accepted, rejected or fails, and the PID processor's output
// otherwise. 'tune_ready' tells that proposed gains wait for accept or
// reject; they are shown on prop_kp/ki/kd and prop_mode, together with the
// identified model (t0, t1, t2, tau, dcs, k_gain), so the operator can judge
// them. Inputs are 10-bit ADC codes (sp, pv); 'vo' is the 12-bit code for
// the DAC that drives the 4-20 mA actuator signal. The ADC, DAC and current
// loop are outside this module.
//
// Timing: one PID update takes four clocks after a tick, so 'period' must be
// at least 5 clocks while controlling. The tuning run lasts as many ticks as
// the process needs to settle (at most DEPTH), plus about 150 clocks.
//
// The structure (PID processor, Dahlin auto-tuner, step-test hand-over)
// follows the original design; the gain registers, manual gain write,
// bumpless preset and the output selection are this design's choices.
module pid_autotune_top
  import pid_pkg::*;
#(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned TW    = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [31:0]       period,      // sampling period in clocks
  input  logic [PV_W-1:0]   sp,
  input  logic [PV_W-1:0]   pv,
  input  logic              ctrl_en,
  // tuning
  input  logic              tune_start,
  input  logic              accept,
  input  logic              reject,
  input  logic [VO_W-1:0]   mv_base,
  input  logic [VO_W-1:0]   dm,
  input  logic [7:0]        ext_step,
  // manual gains
  input  logic              gain_we,
  input  logic [GAIN_W-1:0] kp_in,
  input  logic [GAIN_W-1:0] ki_in,
  input  logic [GAIN_W-1:0] kd_in,
  // outputs
  output logic [VO_W-1:0]   vo,
  output logic              tick,
  output logic              pid_done,
  output logic              tuning,
  output logic              tune_ready,
  output logic              tune_fail,
  output logic              tune_load,
  output tune_mode_e        mode,
  output tune_mode_e        prop_mode,   // proposed by the last tuning run
  output logic [GAIN_W-1:0] prop_kp,
  output logic [GAIN_W-1:0] prop_ki,
  output logic [GAIN_W-1:0] prop_kd,
  output logic [GAIN_W-1:0] kp,
  output logic [GAIN_W-1:0] ki,
  output logic [GAIN_W-1:0] kd,
  output logic [TW-1:0]     t0,
  output logic [TW-1:0]     t1,
  output logic [TW-1:0]     t2,
  output logic [TW:0]       tau,
  output logic [PV_W-1:0]   dcs,
  output logic [15:0]       k_gain
);
  logic [VO_W-1:0]   tune_mv, pid_vo;
  logic [GAIN_W-1:0] tkp, tki, tkd;
  tune_mode_e        tmode;

  assign prop_kp   = tkp;
  assign prop_ki   = tki;
  assign prop_kd   = tkd;
  assign prop_mode = tmode;

  sample_timer #(.CNT_W(32)) u_timer (
    .clk, .rst_n, .en(1'b1), .period, .tick
  );

  autotune_ctrl #(.DEPTH(DEPTH), .TW(TW)) u_tune (
    .clk, .rst_n, .tick, .start(tune_start), .accept, .reject, .pv,
    .mv_base, .dm, .ext_step, .mv(tune_mv), .busy(tuning), .ready(tune_ready),
    .load(tune_load), .fail(tune_fail), .t0, .t1, .t2, .dcs, .tau, .k_gain,
    .mode(tmode), .kp(tkp), .ki(tki), .kd(tkd)
  );

  // gain registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      kp <= '0; ki <= '0; kd <= '0; mode <= MODE_PID;
    end else if (tune_load) begin
      kp <= tkp; ki <= tki; kd <= tkd; mode <= tmode;
    end else if (gain_we && !tuning && !tune_ready) begin
      kp <= kp_in; ki <= ki_in; kd <= kd_in; mode <= MODE_PID;
    end
  end

  logic tune_active;
  assign tune_active = tuning || tune_ready;

  pid_processor #(.ADD_W(22)) u_pid (
    .clk, .rst_n,
    .start(tick && ctrl_en && !tune_active && !tune_load),
    .sp, .pv, .kp, .ki, .kd,
    .preset(tune_load), .preset_val(tune_mv),
    .vo(pid_vo), .busy(), .done(pid_done)
  );

  assign vo = tune_active ? tune_mv : pid_vo;
endmodule
