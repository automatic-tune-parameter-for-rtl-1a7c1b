// Unsigned sequential divider (restoring, one quotient bit per clock).
//
// 'start' samples 'num' and 'den'; W cycles later 'done' pulses with
// 'quo' = num / den. Division by zero returns all ones. Used by the Dahlin
// parameter calculation, which needs four quotients per tuning run and has
// no throughput requirement, so a small serial divider is enough.
module seq_divider #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] num,
  input  logic [W-1:0] den,
  output logic [W-1:0] quo,
  output logic         busy,
  output logic         done
);
  localparam int unsigned CW = $clog2(W + 1);
  logic [W-1:0]  d_r, q_r;
  logic [W-1:0]  rem;
  logic [CW-1:0] cnt;
  logic [W:0]    shifted;   // partial remainder shifted left by one bit
  logic          fits;

  always_comb begin
    shifted = {rem, q_r[W-1]};
    fits    = (shifted >= {1'b0, d_r});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_r <= '0; q_r <= '0; rem <= '0; cnt <= '0;
      busy <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        d_r  <= den;
        q_r  <= num;
        rem  <= '0;
        cnt  <= CW'(W);
        busy <= 1'b1;
      end else if (busy) begin
        if (fits) begin
          rem <= W'(shifted - {1'b0, d_r});
          q_r <= {q_r[W-2:0], 1'b1};
        end else begin
          rem <= shifted[W-1:0];
          q_r <= {q_r[W-2:0], 1'b0};
        end
        cnt <= cnt - 1'b1;
        if (cnt == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  a_no_restart: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy)
    else $error("seq_divider: start while busy");

  assign quo = q_r;
endmodule
