// Self-checking testbench of pid_processor.
//
// Drives random set points, process values and gains through many samples
// and compares Vo with an integer model of the velocity-form PID equation
// (accumulator with 4 fraction bits, saturating at 0 and full scale). Also
// checks the four-clock latency from 'start' to 'done', the preset of
// Vo[n-1] and both saturation limits.
module tb_pid_processor;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, preset = 1'b0;
  logic [9:0] sp = '0, pv = '0;
  logic [7:0] kp = '0, ki = '0, kd = '0;
  logic [11:0] preset_val = '0, vo;
  logic busy, done;
  int checks = 0, failures = 0;
  int acc_ref = 0, e1 = 0, e2 = 0;
  int n_sat_lo = 0, n_sat_hi = 0;

  pid_processor dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic do_sample(input int s, input int p, input int gp, input int gi, input int gd);
    int e, inc, lat;
    sp = 10'(s); pv = 10'(p); kp = 8'(gp); ki = 8'(gi); kd = 8'(gd);
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    lat = 1;
    while (!done) begin
      @(negedge clk);
      lat++;
    end
    e = s - p;
    inc = (gp + gi + gd) * e - (gp + 2 * gd) * e1 + gd * e2;
    acc_ref += inc;
    if (acc_ref < 0) begin acc_ref = 0; n_sat_lo++; end
    if (acc_ref > 65535) begin acc_ref = 65535; n_sat_hi++; end
    e2 = e1; e1 = e;
    check(lat == 4, $sformatf("latency %0d", lat));
    check(int'(vo) == acc_ref / 16, $sformatf("vo %0d expected %0d (e=%0d)", vo, acc_ref / 16, e));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(vo == 0, "vo after reset");
    // fixed gains, step in the set point (as a unit-step simulation)
    for (int i = 0; i < 20; i++) do_sample(600, 500, 16, 4, 8);
    // random operation
    for (int i = 0; i < 400; i++)
      do_sample($urandom_range(0, 1023), $urandom_range(0, 1023),
                $urandom_range(0, 255), $urandom_range(0, 255), $urandom_range(0, 255));
    // small gains, small errors: accumulation of fractions
    for (int i = 0; i < 100; i++)
      do_sample(512 + $urandom_range(0, 6), 512, 1, 1, 0);
    // preset
    @(negedge clk) begin preset = 1'b1; preset_val = 12'd1234; end
    @(negedge clk) preset = 1'b0;
    acc_ref = 1234 * 16; e1 = 0; e2 = 0;
    check(vo == 12'd1234, "preset value");
    do_sample(300, 300, 10, 10, 10);
    do_sample(310, 300, 10, 10, 10);
    check(n_sat_lo > 0, "low saturation exercised");
    check(n_sat_hi > 0, "high saturation exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
