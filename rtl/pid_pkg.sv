// Shared widths and fixed-point formats of the auto-tuning PID controller.
//
// Set point and process variable are 10-bit ADC codes, the three gains are
// 8-bit and the controller output is a 12-bit DAC code; these four widths
// follow the controller's specification. The gain format (unsigned, with
// GAIN_FRAC fractional bits) and the 11-bit signed error are this design's
// choices: a 10-bit minus a 10-bit code needs 11 bits, and Dahlin gains are
// usually fractional, so an integer-only gain would be too coarse.
package pid_pkg;
  localparam int unsigned PV_W      = 10;  // SP and PV, ADC codes
  localparam int unsigned GAIN_W    = 8;   // Kp, Ki, Kd
  localparam int unsigned VO_W      = 12;  // controller output, DAC code
  localparam int unsigned GAIN_FRAC = 4;   // fractional bits of a gain
  localparam int unsigned ERR_W     = PV_W + 1;    // signed SP - PV
  localparam int unsigned COEF_W    = GAIN_W + 2;  // Kp+Ki+Kd and Kp+2Kd

  // Controller operating mode chosen by the Dahlin rules
  typedef enum logic {
    MODE_PI  = 1'b0,
    MODE_PID = 1'b1
  } tune_mode_e;
endpackage
