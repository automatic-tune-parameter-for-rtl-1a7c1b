// End-to-end testbench of pid_autotune_top at its default sizes, closed
// around a first-order-lag-plus-dead-time process model (fopdt_plant).
//
// Scenario:
//  1. fixed, hand-written gains and a step in the set point (closed loop);
//     every PID update is compared with an integer model of the incremental
//     PID equation.
//  2. auto-tuning on a process with long dead time (PID gains expected),
//     rejected once, then run again and accepted; the hand-over must be
//     bumpless and the loop must then hold the set point.
//  3. auto-tuning on a process with short dead time (PI gains expected),
//     accepted, and a set-point change followed.
//  4. auto-tuning with no process response, which must fail.
// Each mechanism (manual gains, tuning run, PID mode, PI mode, accept,
// reject, failure, bumpless preset, output saturation of the PID) is
// counted; one that never occurred is a failure.
module tb_pid_autotune_top;
  import pid_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [31:0] period = 32'd8;
  logic [9:0] sp = '0, pv;
  logic ctrl_en = 1'b0, tune_start = 1'b0, accept = 1'b0, reject = 1'b0;
  logic [11:0] mv_base = '0, dm = '0;
  logic [7:0] ext_step = 8'd8;
  logic gain_we = 1'b0;
  logic [7:0] kp_in = '0, ki_in = '0, kd_in = '0;
  logic [11:0] vo;
  logic tick, pid_done, tuning, tune_ready, tune_fail, tune_load;
  tune_mode_e mode, prop_mode;
  logic [7:0] prop_kp, prop_ki, prop_kd;
  logic [7:0] kp, ki, kd;
  logic [9:0] t0, t1, t2;
  logic [10:0] tau;
  logic [9:0] dcs;
  logic [15:0] k_gain;

  // process model
  logic plant_init = 1'b0;
  real  p_gain = 0.25, p_tau = 30.0, p_off = 0.0;
  int   p_dead = 12;

  pid_autotune_top dut (.*);
  fopdt_plant plant (.clk, .tick, .init(plant_init), .u(vo), .gain(p_gain),
                     .tau(p_tau), .dead(p_dead), .offset(p_off), .pv);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_manual = 0, n_tune = 0, n_pid_mode = 0, n_pi_mode = 0, n_accept = 0;
  int n_reject = 0, n_fail = 0, n_bumpless = 0, n_sat = 0, n_updates = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference model of the PID processor, fed with what it samples.
  int mv_at_accept = 0;
  int acc_ref = 0, e1_ref = 0, e2_ref = 0, e_pend = 0;
  bit pend = 0;
  always @(posedge clk) begin
    if (tune_load) begin
      acc_ref = mv_at_accept * 16;
      e1_ref = 0; e2_ref = 0;
    end
    if (tick && ctrl_en && !tuning && !tune_ready && !tune_load) begin
      e_pend = int'(sp) - int'(pv);
      pend = 1;
    end
    if (pid_done && pend) begin
      int inc;
      inc = (int'(kp) + int'(ki) + int'(kd)) * e_pend - (int'(kp) + 2 * int'(kd)) * e1_ref
            + int'(kd) * e2_ref;
      acc_ref += inc;
      if (acc_ref < 0) begin acc_ref = 0; n_sat++; end
      if (acc_ref > 65535) begin acc_ref = 65535; n_sat++; end
      e2_ref = e1_ref; e1_ref = e_pend;
      pend = 0;
      n_updates++;
      #1;
      checks++;
      if (int'(vo) != acc_ref / 16) begin
        failures++;
        $display("FAIL PID update: vo %0d expected %0d", vo, acc_ref / 16);
      end
    end
  end

  task automatic wait_ticks(input int n);
    repeat (n) @(posedge tick);
    @(negedge clk);
  endtask

  task automatic pulse(ref logic s);
    @(negedge clk) s = 1'b1;
    @(negedge clk) s = 1'b0;
  endtask

  task automatic settle_plant();
    // control off; start the model in steady state at the present output
    ctrl_en = 1'b0;
    @(negedge clk) plant_init = 1'b1;
    @(negedge clk) plant_init = 1'b0;
  endtask

  // one tuning run; returns 1 if proposed gains are waiting
  task automatic tune(input bit take);
    int guard = 0;
    mv_base = vo; dm = 12'd1200;
    pulse(tune_start);
    n_tune++;
    while ((tuning || !tune_ready) && !tune_fail && guard < 3000) begin
      @(posedge tick); guard++;
    end
    @(negedge clk);
    if (tune_fail) begin
      n_fail++;
      return;
    end
    check(tune_ready, "tuning produced gains");
    $display("tuned: dcs=%0d t0=%0d t1=%0d t2=%0d tau=%0d K=%0d/256 mode=%s kp=%0d ki=%0d kd=%0d",
             dcs, t0, t1, t2, tau, k_gain, prop_mode.name(), prop_kp, prop_ki, prop_kd);
    if (take) begin
      logic [11:0] mv_hold = vo;
      logic [7:0] pkp = prop_kp, pki = prop_ki, pkd = prop_kd;
      tune_mode_e pm = prop_mode;
      mv_at_accept = int'(vo);
      pulse(accept);
      @(negedge clk);
      n_accept++;
      check(kp == pkp && ki == pki && kd == pkd && mode == pm, "gains loaded on accept");
      check(vo == mv_hold, "bumpless hand-over");
      if (vo == mv_hold) n_bumpless++;
      if (pm == MODE_PID) n_pid_mode++; else n_pi_mode++;
    end else begin
      logic [7:0] okp = kp;
      pulse(reject);
      @(negedge clk);
      n_reject++;
      check(kp == okp && !tune_ready, "reject keeps the old gains");
    end
  endtask

  function automatic int absi(input int v);
    return (v < 0) ? -v : v;
  endfunction

  // run closed loop for n ticks; returns peak pv seen
  task automatic run_loop(input int n, output int peak);
    peak = 0;
    ctrl_en = 1'b1;
    repeat (n) begin
      @(posedge tick);
      if (int'(pv) > peak) peak = int'(pv);
    end
    @(negedge clk);
  endtask

  initial begin
    int peak, start_pv;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // 1. fixed gains, set point step (Kp = 1.0, Ki = 0.25, Kd = 0.5)
    settle_plant();
    kp_in = 8'd16; ki_in = 8'd4; kd_in = 8'd8;
    pulse(gain_we);
    n_manual++;
    check(kp == 8'd16 && ki == 8'd4 && kd == 8'd8, "manual gains written");
    sp = 10'd300;
    run_loop(60, peak);
    sp = 10'd0;
    run_loop(60, peak);              // drives the output to its low limit

    // 2. long dead time process: PID expected
    ctrl_en = 1'b0;
    @(negedge clk);
    p_gain = 0.25; p_tau = 30.0; p_dead = 12; p_off = 0.0;
    settle_plant();
    tune(1'b0);                      // rejected run
    settle_plant();
    tune(1'b1);                      // accepted run
    start_pv = int'(pv);
    sp = 10'd450;
    run_loop(500, peak);
    $display("PID loop: from pv=%0d to sp=%0d: pv=%0d peak=%0d overshoot=%0d%%", start_pv, sp, pv, peak,
             100 * (peak - int'(sp)) / (int'(sp) - start_pv));
    check(absi(int'(pv) - int'(sp)) <= 10, "PID loop holds the set point");
    check(peak <= int'(sp) + (int'(sp) - start_pv) / 20 + 2, "PID loop overshoot within 5 %");

    // 3. short dead time process: PI expected
    ctrl_en = 1'b0;
    p_tau = 40.0; p_dead = 3;
    settle_plant();
    tune(1'b1);
    start_pv = int'(pv);
    sp = 10'd900;
    run_loop(600, peak);
    $display("PI loop: from pv=%0d to sp=%0d: pv=%0d peak=%0d overshoot=%0d%%", start_pv, sp, pv, peak,
             100 * (peak - int'(sp)) / (int'(sp) - start_pv));
    check(absi(int'(pv) - int'(sp)) <= 10, "PI loop holds the set point");
    check(peak <= int'(sp) + (int'(sp) - start_pv) / 20 + 2, "PI loop overshoot within 5 %");

    // 4. no response
    ctrl_en = 1'b0;
    p_gain = 0.0;
    settle_plant();
    tune(1'b1);
    check(tune_fail, "flat response fails the tuning run");

    check(n_manual > 0, "mechanism: manual gains");
    check(n_tune > 0, "mechanism: tuning run");
    check(n_pid_mode > 0, "mechanism: PID mode chosen");
    check(n_pi_mode > 0, "mechanism: PI mode chosen");
    check(n_accept > 0, "mechanism: accept");
    check(n_reject > 0, "mechanism: reject");
    check(n_fail > 0, "mechanism: tuning failure");
    check(n_bumpless > 0, "mechanism: bumpless preset");
    check(n_sat > 0, "mechanism: output saturation");
    check(n_updates > 100, "PID updates");
    $display("counts: manual=%0d tune=%0d pid=%0d pi=%0d accept=%0d reject=%0d fail=%0d bumpless=%0d sat=%0d updates=%0d",
             n_manual, n_tune, n_pid_mode, n_pi_mode, n_accept, n_reject, n_fail, n_bumpless, n_sat, n_updates);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
