// Self-checking testbench of autotune_ctrl.
//
// Plays several step responses (first-order lag plus dead time, worked out
// here from the exponential, and a ramp that never settles) into the
// auto-tuner, and runs a reference model of the identification written in
// this file: record dc, find the response start (dc >= 31), feed every
// ext_step-th sample to a three-point Newton extrapolation, stop when
// x3 >= x4, search the 3 %, 28.3 % and 63.2 % crossings and apply the Dahlin
// rules. Every reported time, dcs and gain is compared with the model. Also
// checks the step on 'mv', accept ('load' pulse) and reject, the failure on
// a flat response, and counts PI runs, PID runs and a full record.
module tb_autotune_ctrl;
  import pid_pkg::*;
  localparam int DEPTH = 256;
  logic clk = 1'b0, rst_n = 1'b0, tick = 1'b0;
  logic start = 1'b0, accept = 1'b0, reject = 1'b0;
  logic [9:0] pv = '0;
  logic [11:0] mv_base = '0, dm = '0, mv;
  logic [7:0] ext_step = 8'd1;
  logic busy, ready, load, fail;
  logic [7:0] t0, t1, t2;
  logic [9:0] dcs;
  logic [8:0] tau;
  logic [15:0] k_gain;
  tune_mode_e mode;
  logic [7:0] kp, ki, kd;
  int checks = 0, failures = 0;
  int n_pi = 0, n_pid = 0, n_full = 0, n_fail = 0, n_load = 0;

  autotune_ctrl #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (load) n_load++;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // response of the simulated process k sampling periods after the step
  function automatic int resp(input int kind, input real a, input real tc, input int dead, input int k);
    if (kind == 1) return (k * 3 > 900) ? 900 : k * 3;        // ramp
    if (kind == 2) return 0;                                  // no response
    if (k <= dead) return 0;
    return int'($floor(a * (1.0 - $exp(-real'(k - dead) / tc)) + 0.5));
  endfunction

  function automatic int frac(input int v, input int c);
    int r = (v * c) / 1024;
    return (r < 1) ? 1 : r;
  endfunction

  task automatic tick_once();
    repeat (3) @(negedge clk);
    tick = 1'b1;
    @(negedge clk) tick = 1'b0;
  endtask

  task automatic run(input int kind, input real a, input real tc, input int dead,
                     input int base, input int step, input int es, input bit acc);
    int dc[DEPTH];
    int win[$];
    int n, k, e_dcs, e0, e1, e2, thr0, thr1, thr2, cnt, guard;
    bit started, settled, efail;
    longint dt, z, ekp, eki, ekd;
    bit pid;
    int loads_before;

    // reference model
    dc[0] = 0; started = 0; settled = 0; efail = 0; cnt = 0; n = 0; e_dcs = 0;
    for (k = 1; k < DEPTH; k++) begin
      dc[k] = resp(kind, a, tc, dead, k);
      if (!started) begin
        if (dc[k] >= 31) begin started = 1; win.push_back(dc[k]); cnt = 0; end
      end else if (cnt + 1 >= es) begin
        win.push_back(dc[k]); cnt = 0;
      end else cnt++;
      if (win.size() > 3) void'(win.pop_front());
      if (win.size() == 3 && k != 0) begin
        int p3 = win[0] - 3 * win[1] + 3 * win[2];
        int p4 = 3 * win[0] - 8 * win[1] + 6 * win[2];
        if (p3 >= p4 && (win.size() == 3)) begin
          settled = 1;
          e_dcs = (p3 < 1) ? 1 : (p3 > 1023) ? 1023 : p3;
          n = k + 1;
          break;
        end
      end
    end
    win.delete();
    if (!settled) begin
      n = DEPTH;
      if (started) e_dcs = (dc[DEPTH-1] == 0) ? 1 : dc[DEPTH-1];
      else efail = 1;
    end
    thr0 = frac(e_dcs, 31); thr1 = frac(e_dcs, 290); thr2 = frac(e_dcs, 647);
    e0 = -1; e1 = -1; e2 = -1;
    for (int i = 0; i < n; i++) begin
      if (e0 < 0 && dc[i] >= thr0) e0 = i;
      if (e1 < 0 && dc[i] >= thr1) e1 = i;
      if (e2 < 0 && dc[i] >= thr2) e2 = i;
    end
    if (e0 < 0) e0 = n - 1;
    if (e1 < 0) e1 = n - 1;
    if (e2 < 0) e2 = n - 1;
    dt = (e2 > e1) ? e2 - e1 : 1;
    z  = (e0 > 0) ? e0 : 1;
    ekp = (12 * dt * step) / (z * e_dcs);  if (ekp > 255) ekp = 255;
    eki = (8 * longint'(step)) / (z * e_dcs); if (eki > 255) eki = 255;
    pid = (real'(z) > 0.375 * real'(dt));
    ekd = pid ? (6 * dt * step) / e_dcs : 0; if (ekd > 255) ekd = 255;

    // drive the device
    loads_before = n_load;
    pv = 10'(base); mv_base = 12'(1000); dm = 12'(step); ext_step = 8'(es);
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    check(busy && mv == 12'd1000, "armed with mv_base");
    tick_once();                                  // step instant
    check(int'(mv) == ((1000 + step > 4095) ? 4095 : 1000 + step), "step on mv");
    k = 0; guard = 0;
    while (busy && guard < DEPTH + 400) begin
      if (k < DEPTH - 1) begin
        k++;
        pv = 10'(base + resp(kind, a, tc, dead, k));
      end
      tick_once();
      guard++;
    end
    if (efail) begin
      check(fail && !ready, "flat response reported as failure");
      n_fail++;
      return;
    end
    check(ready && !fail, "ready after tuning");
    check(int'(dcs) == e_dcs, $sformatf("dcs %0d expected %0d", dcs, e_dcs));
    check(int'(t0) == e0, $sformatf("t0 %0d expected %0d", t0, e0));
    check(int'(t1) == e1, $sformatf("t1 %0d expected %0d", t1, e1));
    check(int'(t2) == e2, $sformatf("t2 %0d expected %0d", t2, e2));
    check((mode == MODE_PID) == pid, "mode");
    check(longint'(kp) == ekp, $sformatf("kp %0d expected %0d", kp, ekp));
    check(longint'(ki) == eki, $sformatf("ki %0d expected %0d", ki, eki));
    check(longint'(kd) == ekd, $sformatf("kd %0d expected %0d", kd, ekd));
    if (pid) n_pid++; else n_pi++;
    if (!settled) n_full++;
    $display("run: dcs=%0d t0=%0d t1=%0d t2=%0d mode=%s kp=%0d ki=%0d kd=%0d",
             dcs, t0, t1, t2, mode.name(), kp, ki, kd);
    if (acc) begin
      @(negedge clk) accept = 1'b1;
      @(negedge clk) accept = 1'b0;
      @(negedge clk);
      check(n_load == loads_before + 1, "load pulse on accept");
    end else begin
      @(negedge clk) reject = 1'b1;
      @(negedge clk) reject = 1'b0;
      @(negedge clk);
      check(n_load == loads_before, "no load on reject");
    end
    @(negedge clk);
    check(!busy && !ready, "idle after decision");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    run(0, 400.0, 20.0, 12, 100, 800, 4, 1'b1);    // long dead time: PID
    run(0, 500.0, 30.0, 3, 50, 1000, 6, 1'b0);     // short dead time: PI
    run(0, 300.0, 10.0, 8, 200, 3500, 10, 1'b1);   // output step saturates
    run(0, 200.0, 15.0, 20, 0, 500, 1, 1'b1);      // sample by sample
    run(1, 0.0, 1.0, 0, 10, 400, 3, 1'b1);         // ramp: record fills
    run(2, 0.0, 1.0, 0, 10, 400, 3, 1'b1);         // no response: failure
    check(n_pi > 0 && n_pid > 0 && n_full > 0 && n_fail > 0,
          $sformatf("cases seen: PI %0d PID %0d full %0d fail %0d", n_pi, n_pid, n_full, n_fail));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
