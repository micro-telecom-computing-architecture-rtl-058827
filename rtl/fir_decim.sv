// Decimating FIR filter with a time-shared multiplier bank.
//
// Input samples are written into a circular buffer. On every D-th input the
// filter computes one output, y = sum_j h[j] * x[newest - j], using MACS
// multipliers per clock, so one output takes ceil(TAPS/MACS) clocks plus a
// few of pipeline. Only the outputs that survive decimation are computed.
// The tap counts and factors of the design are 101 taps without decimation
// after the turn-by-turn CIC, 69 taps decimating by 5 towards FA and 99 taps
// decimating by 10 towards SA; the defaults are the first of these.
//
// Coefficients are 18-bit signed, Q1.17, read from COEF_FILE (one hex word
// per line, 18-bit two's complement); they sum to 2^17 for unity DC gain.
// The accumulator is exact; the output is the accumulator shifted right by
// 17 and saturated to OUT_W bits.
//
// The buffer holds DEPTH >= TAPS samples, so inputs may keep arriving while
// an output is computed, as long as fewer than DEPTH - TAPS of them arrive
// in one computation. A new output request while the previous one is still
// running is dropped and sets the sticky overrun flag (an assertion reports
// it in simulation). out_valid is a one-clock strobe.
module fir_decim
  import bpm_pkg::*;
#(
  parameter int unsigned IN_W   = 24,
  parameter int unsigned OUT_W  = 24,
  parameter int unsigned TAPS   = 101,
  parameter int unsigned D      = 1,
  parameter int unsigned MACS   = 5,
  parameter int unsigned DEPTH  = 2 ** $clog2(TAPS + 8),
  parameter string       COEF_FILE = "rtl/fir_tbt_101.hex"
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  x,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] y,
  output logic                    overrun
);
  localparam int unsigned STEPS = (TAPS + MACS - 1) / MACS;
  localparam int unsigned NCOEF = STEPS * MACS;
  localparam int unsigned AB    = $clog2(DEPTH);
  localparam int unsigned SW    = $clog2(STEPS + 1);
  localparam int unsigned DW    = (D > 1) ? $clog2(D) : 1;
  localparam int unsigned PW    = IN_W + COEF_W;
  localparam int unsigned ACCW  = PW + $clog2(NCOEF) + 1;

  typedef logic signed [IN_W-1:0]   smp_t;
  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic signed [ACCW-1:0]   acc_t;

  coef_t         rom [NCOEF];
  smp_t          buf_q [DEPTH];
  logic [AB-1:0] wptr;      // next write position
  logic [AB-1:0] base;      // position of the newest sample of this output
  logic [DW-1:0] dcnt;
  logic          busy;
  logic [SW-1:0] step;
  logic          mac_v;     // products of this clock are valid
  logic          last_v;    // products of the last step
  logic signed [PW-1:0] prod [MACS];
  acc_t          acc;
  logic          fire;

  initial begin
    for (int i = 0; i < NCOEF; i++) rom[i] = '0;
    $readmemh(COEF_FILE, rom, 0, TAPS - 1);
  end

  assign fire = in_valid && (dcnt == DW'(D - 1));

  // Sample buffer and decimation phase.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) buf_q[i] <= '0;
      wptr <= '0;
      dcnt <= '0;
    end else if (in_valid) begin
      buf_q[wptr] <= x;
      wptr <= wptr + 1'b1;
      dcnt <= (dcnt == DW'(D - 1)) ? '0 : dcnt + 1'b1;
    end
  end

  // Step sequencer: step s uses taps s*MACS .. s*MACS+MACS-1.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      step    <= '0;
      base    <= '0;
      overrun <= 1'b0;
    end else begin
      if (fire && busy) overrun <= 1'b1;
      if (!busy) begin
        if (fire) begin
          busy <= 1'b1;
          step <= '0;
          base <= wptr;   // the sample written in this clock
        end
      end else if (step == SW'(STEPS - 1)) begin
        busy <= 1'b0;
      end else begin
        step <= step + 1'b1;
      end
    end
  end

  // Multiplier bank, one register stage.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int m = 0; m < MACS; m++) prod[m] <= '0;
      mac_v  <= 1'b0;
      last_v <= 1'b0;
    end else begin
      mac_v  <= busy;
      last_v <= busy && (step == SW'(STEPS - 1));
      for (int m = 0; m < MACS; m++) begin
        automatic int unsigned j = int'(step) * MACS + m;
        prod[m] <= busy ? PW'(rom[j] * buf_q[AB'(base - AB'(j))]) : '0;
      end
    end
  end

  // Accumulate and round off.
  acc_t step_sum;
  always_comb begin
    step_sum = '0;
    for (int m = 0; m < MACS; m++) step_sum = step_sum + ACCW'(prod[m]);
  end

  acc_t acc_next, shifted;
  localparam acc_t MAXV = acc_t'((64'sd1 <<< (OUT_W - 1)) - 1);
  localparam acc_t MINV = -acc_t'(64'sd1 <<< (OUT_W - 1));
  assign acc_next = acc + step_sum;
  assign shifted  = acc_next >>> COEF_FRAC;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      y         <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (mac_v) begin
        if (last_v) begin
          acc       <= '0;
          out_valid <= 1'b1;
          if (shifted > MAXV)      y <= OUT_W'(MAXV);
          else if (shifted < MINV) y <= OUT_W'(MINV);
          else                     y <= OUT_W'(shifted);
        end else begin
          acc <= acc_next;
        end
      end
    end
  end

  // A request while busy loses an output: the input rate is too high for
  // this TAPS/MACS combination.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n) !(fire && busy))
    else $error("fir_decim: output request while busy");

endmodule
