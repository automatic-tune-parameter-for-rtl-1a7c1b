// Auto-tuner: open-loop step test, process identification and hand-off to
// the Dahlin parameter calculation.
//
// Sequence (one tuning run):
//  1. 'start' arms the test and sets the output 'mv' to 'mv_base'. At the
//     next sampling tick the process variable is taken as the baseline c0
//     and 'mv' steps to mv_base + dm.
//  2. At every tick dc = pv - c0 (0 if negative) is written to the response
//     record. The response is taken to have begun at the first dc of at
//     least DEAD_THR (3 % of the ADC range).
//  3. From that sample on, every ext_step-th sample is fed to the Newton
//     extrapolator. When its prediction levels off (x3 >= x4), x3 becomes the
//     steady-state change dcs (limited to 1..2^PV_W-1). If the record fills
//     first, the last sample is used as dcs; if the response never began,
//     the run ends with 'fail'.
//  4. The record is scanned once: t0, t1 and t2 are the first sampling
//     instants with dc >= 3 %, 28.3 % and 63.2 % of dcs (fractions as
//     31/1024, 290/1024 and 647/1024, at least 1 count). A crossing that is
//     not in the record is set to the last recorded instant.
//  5. dahlin_calc turns t0, t1, t2, dcs and dm into K, tau, the PI/PID mode
//     and Kp, Ki, Kd; then 'ready' rises.
//  6. 'accept' pulses 'load' for one clock (the caller copies the gains into
//     the PID processor) and returns to idle; 'reject' returns to idle
//     without 'load'. 'mv' keeps the step value in idle, so that the
//     controller can take over from it without a bump.
// Times are counted in sampling periods, with the step at instant 0.
//
// The step test, the 3 % dead-time rule, the 28.3 %/63.2 % points, the
// extrapolated final value and the accept decision follow the original
// method and flowchart. The response record, the thresholds as binary
// fractions, the fall-backs and the handshake are this design's choices.
module autotune_ctrl
  import pid_pkg::*;
#(
  parameter int unsigned          DEPTH    = 1024,
  parameter int unsigned          TW       = $clog2(DEPTH),
  parameter logic [PV_W-1:0]      DEAD_THR = 10'd31
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              tick,
  input  logic              start,
  input  logic              accept,
  input  logic              reject,
  input  logic [PV_W-1:0]   pv,
  input  logic [VO_W-1:0]   mv_base,
  input  logic [VO_W-1:0]   dm,
  input  logic [7:0]        ext_step,
  output logic [VO_W-1:0]   mv,
  output logic              busy,
  output logic              ready,
  output logic              load,
  output logic              fail,
  output logic [TW-1:0]     t0,
  output logic [TW-1:0]     t1,
  output logic [TW-1:0]     t2,
  output logic [PV_W-1:0]   dcs,
  output logic [TW:0]       tau,
  output logic [15:0]       k_gain,
  output tune_mode_e        mode,
  output logic [GAIN_W-1:0] kp,
  output logic [GAIN_W-1:0] ki,
  output logic [GAIN_W-1:0] kd
);
  typedef enum logic [2:0] {S_IDLE, S_ARM, S_RECORD, S_SCAN, S_CALC, S_READY} state_e;
  state_e state;

  localparam logic [TW:0] LAST = (TW+1)'(DEPTH - 1);

  logic [PV_W-1:0] c0, dc;
  logic [TW:0]     n;            // next record address = samples recorded
  logic            started;
  logic [7:0]      ext_cnt;

  // response record
  logic            ram_we;
  logic [TW-1:0]   ram_waddr, ram_raddr;
  logic [PV_W-1:0] ram_wdata, ram_rdata;

  sample_ram #(.DW(PV_W), .DEPTH(DEPTH), .AW(TW)) u_rec (
    .clk, .we(ram_we), .waddr(ram_waddr), .wdata(ram_wdata),
    .raddr(ram_raddr), .rdata(ram_rdata)
  );

  // extrapolator
  logic                   ex_clear, ex_valid, ex_settled;
  logic signed [PV_W+4:0] ex_p3;

  newton_extrapolator #(.XW(PV_W), .PW(PV_W + 5)) u_ext (
    .clk, .rst_n, .clear(ex_clear), .x_valid(ex_valid), .x(dc),
    .res_valid(), .p3(ex_p3), .p4(), .settled(ex_settled)
  );

  // parameter calculation
  logic calc_start, calc_done;

  dahlin_calc #(.TW(TW)) u_calc (
    .clk, .rst_n, .start(calc_start), .t0, .t1, .t2, .dcs, .dm,
    .kp, .ki, .kd, .mode, .tau, .k_gain, .busy(), .done(calc_done)
  );

  // scan state
  logic [TW-1:0]   scan_addr, scan_idx;
  logic            scan_vld, scan_issue, scan_done;
  logic            f0, f1, f2;
  logic [PV_W-1:0] thr0, thr1, thr2;

  // v * c / 1024, at least 1; c < 1024 so the result fits PV_W bits
  function automatic logic [PV_W-1:0] frac_of(input logic [PV_W-1:0] v, input logic [9:0] c);
    automatic logic [PV_W+9:0] prod = (PV_W+10)'(v) * (PV_W+10)'(c);
    return (prod[PV_W+9:10] == '0) ? PV_W'(1) : prod[PV_W+9:10];
  endfunction

  always_comb begin
    dc        = (pv > c0) ? pv - c0 : '0;
    thr0      = frac_of(dcs, 10'd31);
    thr1      = frac_of(dcs, 10'd290);
    thr2      = frac_of(dcs, 10'd647);
    ram_we    = 1'b0;
    ram_waddr = n[TW-1:0];
    ram_wdata = dc;
    if (state == S_ARM && tick) begin
      ram_we    = 1'b1;
      ram_waddr = '0;
      ram_wdata = '0;
    end else if (state == S_RECORD && tick) begin
      ram_we = 1'b1;
    end
    ram_raddr  = scan_addr;
    scan_issue = (state == S_SCAN) && ((TW+1)'(scan_addr) < n) && !scan_done;
    ex_clear   = (state == S_ARM);
    ex_valid   = 1'b0;
    if (state == S_RECORD && tick) begin
      if (!started) ex_valid = (dc >= DEAD_THR);
      else          ex_valid = (ext_cnt + 8'd1 >= ext_step);
    end
    calc_start = (state == S_SCAN) && !scan_issue && !scan_vld;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      mv <= '0; c0 <= '0; n <= '0; started <= 1'b0; ext_cnt <= '0;
      dcs <= '0; t0 <= '0; t1 <= '0; t2 <= '0;
      scan_addr <= '0; scan_idx <= '0; scan_vld <= 1'b0; scan_done <= 1'b0;
      f0 <= 1'b0; f1 <= 1'b0; f2 <= 1'b0;
      load <= 1'b0; fail <= 1'b0;
    end else begin
      load <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          mv    <= mv_base;
          fail  <= 1'b0;
          state <= S_ARM;
        end
        S_ARM: if (tick) begin
          c0      <= pv;
          mv      <= (13'(mv_base) + 13'(dm) > 13'(4095)) ? '1 : mv_base + dm;
          n       <= (TW+1)'(1);
          started <= 1'b0;
          ext_cnt <= '0;
          state   <= S_RECORD;
        end
        S_RECORD: begin
          if (tick) begin
            n <= n + 1'b1;
            if (!started) begin
              if (dc >= DEAD_THR) started <= 1'b1;
              ext_cnt <= '0;
            end else begin
              ext_cnt <= (ext_cnt + 8'd1 >= ext_step) ? '0 : ext_cnt + 8'd1;
            end
          end
          if (ex_settled) begin
            if (ex_p3 < 1)                                dcs <= PV_W'(1);
            else if (ex_p3 > (PV_W+5)'((1 << PV_W) - 1))  dcs <= '1;
            else                                          dcs <= ex_p3[PV_W-1:0];
            state <= S_SCAN;
          end else if (tick && n == LAST) begin
            if (started || dc >= DEAD_THR) begin
              dcs   <= (dc == '0) ? PV_W'(1) : dc;
              n     <= n + 1'b1;
              state <= S_SCAN;
            end else begin
              fail  <= 1'b1;
              state <= S_IDLE;
            end
          end
          scan_addr <= '0;
          scan_vld  <= 1'b0;
          scan_done <= 1'b0;
          f0 <= 1'b0; f1 <= 1'b0; f2 <= 1'b0;
        end
        S_SCAN: begin
          if (scan_issue) begin
            scan_addr <= scan_addr + 1'b1;
            if ((TW+1)'(scan_addr) + 1'b1 >= n) scan_done <= 1'b1;
          end
          scan_vld <= scan_issue;
          scan_idx <= scan_addr;
          if (scan_vld) begin
            if (!f0 && ram_rdata >= thr0) begin f0 <= 1'b1; t0 <= scan_idx; end
            if (!f1 && ram_rdata >= thr1) begin f1 <= 1'b1; t1 <= scan_idx; end
            if (!f2 && ram_rdata >= thr2) begin f2 <= 1'b1; t2 <= scan_idx; end
          end
          if (calc_start) begin
            if (!f0) t0 <= TW'(n - 1'b1);
            if (!f1) t1 <= TW'(n - 1'b1);
            if (!f2) t2 <= TW'(n - 1'b1);
            state <= S_CALC;
          end
        end
        S_CALC: if (calc_done) state <= S_READY;
        S_READY: begin
          if (accept) begin
            load  <= 1'b1;
            state <= S_IDLE;
          end else if (reject) begin
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // accept and reject are exclusive; load is a single-clock pulse
  a_decision: assert property (@(posedge clk) disable iff (!rst_n) ready |-> !(accept && reject))
    else $error("autotune_ctrl: accept and reject together");
  a_load_pulse: assert property (@(posedge clk) disable iff (!rst_n) load |=> !load)
    else $error("autotune_ctrl: load longer than one clock");

  assign busy  = (state != S_IDLE) && (state != S_READY);
  assign ready = (state == S_READY);
endmodule
