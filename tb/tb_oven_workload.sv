// Workload testbench: the oven temperature experiments, run on a model.
//
// The controller at its default sizes first tunes itself on an oven model,
// then holds a set point of 60 C; after a restart it tunes again with a
// smaller test step, and in a second run follows a change from
// 50 C to 70 C. The oven is a first-order lag plus dead time. Its scaling is
// assumed: 0.1 C per ADC code, 25 C ambient, a full-scale output raising the
// temperature by about 100 C, a time constant of 60 and a dead time of 10
// sampling periods. For each set point, the testbench checks that the
// temperature ends within 1 C of the set point and overshoots by at most 5 %
// of the change. It prints the settling time (within 2 % of the change) in
// sampling periods.
module tb_oven_workload;
  import pid_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [31:0] period = 32'd8;
  logic [9:0] sp = '0, pv;
  logic ctrl_en = 1'b0, tune_start = 1'b0, accept = 1'b0, reject = 1'b0;
  logic [11:0] mv_base = '0, dm = 12'd1000;
  logic [7:0] ext_step = 8'd10;
  logic gain_we = 1'b0;
  logic [7:0] kp_in = '0, ki_in = '0, kd_in = '0;
  logic [11:0] vo;
  logic tick, pid_done, tuning, tune_ready, tune_fail, tune_load;
  tune_mode_e mode, prop_mode;
  logic [7:0] prop_kp, prop_ki, prop_kd, kp, ki, kd;
  logic [9:0] t0, t1, t2, dcs;
  logic [10:0] tau;
  logic [15:0] k_gain;
  logic plant_init = 1'b0;

  pid_autotune_top dut (.*);
  fopdt_plant oven (.clk, .tick, .init(plant_init), .u(vo), .gain(1000.0 / 4095.0),
                    .tau(60.0), .dead(10), .offset(250.0), .pv);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pulse(ref logic s);
    @(negedge clk) s = 1'b1;
    @(negedge clk) s = 1'b0;
  endtask

  task automatic tune_and_accept(input int step);
    // power-up: controller reset (output 0), oven cold at ambient
    ctrl_en = 1'b0;
    rst_n = 1'b0;
    @(negedge clk) rst_n = 1'b1;
    @(negedge clk) plant_init = 1'b1;
    @(negedge clk) plant_init = 1'b0;
    mv_base = '0;
    dm = 12'(step);
    pulse(tune_start);
    while (!tune_ready && !tune_fail) @(posedge clk);
    @(negedge clk);
    check(tune_ready, "tuning finished");
    $display("oven model identified: t0=%0d t1=%0d t2=%0d tau=%0d dcs=%0d mode=%s Kp=%0d/16 Ki=%0d/16 Kd=%0d/16",
             t0, t1, t2, tau, dcs, prop_mode.name(), prop_kp, prop_ki, prop_kd);
    pulse(accept);
  endtask

  // follow set point 'target' (0.1 C codes) for n sampling periods
  task automatic follow(input int target, input int n);
    int start, peak, settle, dev;
    start = int'(pv);
    peak = start;
    settle = -1;
    sp = 10'(target);
    ctrl_en = 1'b1;
    for (int k = 1; k <= n; k++) begin
      @(posedge tick);
      if (int'(pv) > peak) peak = int'(pv);
      dev = int'(pv) - target;
      if (dev < 0) dev = -dev;
      if (50 * dev > (target - start)) settle = -1;
      else if (settle < 0) settle = k;
    end
    @(negedge clk);
    $display("set point %0d.%0d C from %0d.%0d C: end %0d.%0d C, peak %0d.%0d C, settled after %0d periods",
             target / 10, target % 10, start / 10, start % 10, pv / 10, pv % 10, peak / 10, peak % 10, settle);
    check((int'(pv) - target) <= 10 && (target - int'(pv)) <= 10, "ends within 1 C");
    check(peak <= target + (target - start) / 20 + 1, "overshoot at most 5 %");
    check(settle > 0, "settles within 2 %");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    // experiment 1: set point 60 C
    tune_and_accept(1000);
    follow(600, 700);
    // experiment 2: set point 50 C, then 70 C
    tune_and_accept(500);
    follow(500, 700);
    follow(700, 700);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
