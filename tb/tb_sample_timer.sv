// Self-checking testbench of sample_timer: for several periods, checks that
// ticks are one clock wide, come exactly 'period' clocks apart, that the first
// one comes 'period' clocks after enable, and that disabling stops them.
module tb_sample_timer;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [31:0] period = 32'd1;
  logic tick;
  int checks = 0, failures = 0;

  sample_timer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run_period(input int p);
    int since, nticks;
    @(negedge clk) begin en = 1'b0; period = 32'(p); end
    @(negedge clk) en = 1'b1;
    since = 0; nticks = 0;
    while (nticks < 6) begin
      @(posedge clk); #1;
      since++;
      if (tick) begin
        check(since == ((p < 1) ? 1 : p), $sformatf("period %0d: tick after %0d clocks", p, since));
        since = 0;
        nticks++;
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run_period(1);
    run_period(2);
    run_period(5);
    run_period(17);
    run_period(100);
    @(negedge clk) en = 1'b0;
    repeat (3) @(posedge clk);
    for (int i = 0; i < 200; i++) begin
      @(posedge clk); #1;
      check(!tick, "no tick while disabled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
