// Self-checking testbench of dahlin_calc.
//
// Applies random step-test results and compares every output with the
// Dahlin rules worked out here in their textbook form (tau = 1.5*(t2-t1),
// K = dcs/dm, Kp = tau/(K*2*t0), Ki = Kp/tau, Kd = Kp*t0/2, PID only when
// t0 > tau/4), scaled by 16 for the 4 fraction bits of a gain and
// saturated at 255. Includes the corner cases t0 = 0, t2 <= t1 and dm = 0.
module tb_dahlin_calc;
  import pid_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [9:0] t0 = '0, t1 = '0, t2 = '0;
  logic [9:0] dcs = '0;
  logic [11:0] dm = '0;
  logic [7:0] kp, ki, kd;
  tune_mode_e mode;
  logic [10:0] tau;
  logic [15:0] k_gain;
  logic busy, done;
  int checks = 0, failures = 0;
  int n_pi = 0, n_pid = 0, n_sat = 0;

  dahlin_calc dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic longint sat(input longint v, input longint mx);
    return (v > mx) ? mx : v;
  endfunction

  task automatic run(input int a0, input int a1, input int a2, input int c, input int m);
    longint dt, z, ekp, eki, ekd, ek;
    bit pid;
    int cyc;
    t0 = 10'(a0); t1 = 10'(a1); t2 = 10'(a2); dcs = 10'(c); dm = 12'(m);
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    dt = (a2 > a1) ? a2 - a1 : 1;
    z  = (a0 > 0) ? a0 : 1;
    // tau = 3*dt/2; Kp*16 = tau*16*dm/(dcs*2*z) = 12*dt*dm/(z*dcs)
    ekp = sat((12 * dt * m) / (z * c), 255);
    // Ki*16 = Kp*16/tau = 8*dm/(z*dcs)
    eki = sat((8 * longint'(m)) / (z * c), 255);
    // Kd*16 = Kp*16*(z/2) = 6*dt*dm/dcs
    pid = (real'(z) > 0.375 * real'(dt));
    ekd = pid ? sat((6 * dt * m) / c, 255) : 0;
    ek  = (m == 0) ? 65535 : sat((256 * longint'(c)) / m, 65535);
    if (pid) n_pid++; else n_pi++;
    if (ekp == 255) n_sat++;
    check(int'(tau) == int'((3 * dt) / 2), $sformatf("tau %0d", tau));
    check((mode == MODE_PID) == pid, "mode");
    check(longint'(kp) == ekp, $sformatf("kp %0d expected %0d", kp, ekp));
    check(longint'(ki) == eki, $sformatf("ki %0d expected %0d", ki, eki));
    check(longint'(kd) == ekd, $sformatf("kd %0d expected %0d", kd, ekd));
    check(longint'(k_gain) == ek, $sformatf("k %0d expected %0d", k_gain, ek));
    check(cyc < 160, $sformatf("took %0d cycles", cyc));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run(20, 30, 57, 400, 800);     // PID case
    run(5, 40, 140, 500, 1000);    // PI case (t0 <= tau/4)
    run(0, 10, 10, 300, 0);        // degenerate inputs
    for (int i = 0; i < 300; i++) begin
      int a1 = $urandom_range(0, 500);
      run($urandom_range(0, 400), a1, a1 + $urandom_range(0, 500),
          $urandom_range(1, 1023), $urandom_range(1, 4095));
    end
    check(n_pi > 0 && n_pid > 0 && n_sat > 0, "PI, PID and saturation all seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
