// Sampling-period timebase.
//
// Emits a one-clock 'tick' every 'period' clock cycles while 'en' is high;
// the tick marks one sampling instant dT of both the step test and the PID
// loop. 'period' is a run-time input so that the same bitstream serves fast
// and slow processes; 0 and 1 both give a tick on every clock. The first
// tick comes 'period' cycles after 'en' rises. Clearing 'en' restarts the
// count. The run-time divider is this design's choice; the specification
// only names the sampling period.
module sample_timer #(
  parameter int unsigned CNT_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [CNT_W-1:0] period,
  output logic             tick
);
  logic [CNT_W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else if (!en) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else if (cnt + 1'b1 >= period) begin
      cnt  <= '0;
      tick <= 1'b1;
    end else begin
      cnt  <= cnt + 1'b1;
      tick <= 1'b0;
    end
  end
endmodule
