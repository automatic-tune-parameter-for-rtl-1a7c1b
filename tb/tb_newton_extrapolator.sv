// Self-checking testbench of newton_extrapolator.
//
// Feeds random and exponential sample sequences, keeps its own three-sample
// window, and compares p3, p4 and 'settled' with the quadratic Newton
// forward extrapolation worked out here from divided differences with unit
// spacing. Also checks that nothing is reported before three samples and
// after 'clear'.
module tb_newton_extrapolator;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, x_valid = 1'b0;
  logic [9:0] x = '0;
  logic res_valid, settled;
  logic signed [14:0] p3, p4;
  int checks = 0, failures = 0;
  int win[$];
  int n_settled = 0, n_rising = 0;

  newton_extrapolator dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Newton form: F(x) = f0 + x*f[x1,x0] + x(x-1)*f[x2,x1,x0], nodes 0,1,2
  function automatic int newton(input int f0, input int f1, input int f2, input int at);
    int d1, d2;
    d1 = f1 - f0;                 // f[x1,x0]
    d2 = ((f2 - f1) - d1);        // 2 * f[x2,x1,x0]
    return f0 + at * d1 + (at * (at - 1) * d2) / 2;
  endfunction

  task automatic push(input int v);
    @(negedge clk) begin x = 10'(v); x_valid = 1'b1; end
    @(negedge clk) x_valid = 1'b0;
    win.push_back(v);
    if (win.size() > 3) void'(win.pop_front());
    if (win.size() == 3) begin
      int e3, e4;
      e3 = newton(win[0], win[1], win[2], 3);
      e4 = newton(win[0], win[1], win[2], 4);
      check(res_valid, "result valid");
      check(int'(p3) == e3, $sformatf("p3 %0d expected %0d", p3, e3));
      check(int'(p4) == e4, $sformatf("p4 %0d expected %0d", p4, e4));
      check(settled == (e3 >= e4), "settled flag");
      if (e3 >= e4) n_settled++; else n_rising++;
    end else begin
      check(!res_valid && !settled, "no result before three samples");
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 300; i++) push($urandom_range(0, 1023));
    // exponential approach with spacing ratio 0.8 (rising) then settling
    @(negedge clk) clear = 1'b1;
    @(negedge clk) clear = 1'b0;
    win.delete();
    for (int i = 0; i < 40; i++) push(int'(800.0 * (1.0 - 0.8 ** i)));
    // after clear, nothing until three new samples
    @(negedge clk) clear = 1'b1;
    @(negedge clk) clear = 1'b0;
    win.delete();
    push(100);
    push(200);
    push(250);
    check(n_settled > 0 && n_rising > 0, "both outcomes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
