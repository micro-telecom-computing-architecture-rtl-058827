// End-to-end testbench of bpm_dsp_top at reduced FA/SA sizes.
//
// The turn-by-turn path runs at its full size (CIC /12, 101-tap FIR,
// 7-cell CORDIC); the FA and SA stages use small CICs and 15-tap FIRs and
// the crossbar steps every 240 clocks, so that all rates settle within a
// short run. bpm_signal_model supplies four electrode signals through a
// switched front end with unequal channel gains. Phases:
//   A  equal gains, switching off: TBT, FA and SA positions against the
//      difference-over-sum of the true amplitudes; amplitude scale of TBT,
//      FA and SA against the chain's gain
//   B  gains up to 8 % apart, switching off: the TBT position is biased
//   C  same gains, switching on, beam moved to negative X: the SA position
//      must come back to the truth, because every electrode now sees the
//      mean gain
// Throughout: raw-data reordering word by word, no FIR overrun. Each
// mechanism (pattern step, switching disabled, quadrant rotation, zero-sum
// guard, negative position, gain bias, crossbar correction) is counted and
// must occur.
module tb_bpm_dsp_top;
  import bpm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int unsigned XP = 240;
  localparam int unsigned FA_R = 10, FA_D = 2, SA_R = 4, SA_D = 2;

  adc_t adc_in [NCH], adc_raw [NCH], elec [NCH];
  logic xen = 1'b0;
  logic [K_W-1:0] kx = 28'd10_000_000, ky = 28'd10_000_000;
  pos_t xo = '0, yo = '0;
  logic [1:0] xsw; logic xstep;
  logic tiv;
  logic signed [IQ_W-1:0] ti [NCH], tq [NCH];
  amp4_t tbt_amp, fa_amp, sa_amp;
  pos_sample_t tbt_pos, fa_pos, sa_pos;
  logic [NCH-1:0] qrot;
  logic fovr;
  logic [2:0] dz;

  real v [NCH], ph [NCH], gain [NCH];
  int noise = 0;

  bpm_signal_model #(.LAT(4)) model (.clk, .sw_pattern(xsw), .v, .ph, .gain, .noise, .adc(adc_in), .elec);

  bpm_dsp_top #(.XBAR_PERIOD(XP),
                .FA_CIC_R(FA_R), .FA_FIR_TAPS(15), .FA_FIR_D(FA_D), .FA_FIR_FILE("tb/fir_small_15.hex"),
                .SA_CIC_R(SA_R), .SA_FIR_TAPS(15), .SA_FIR_D(SA_D), .SA_FIR_FILE("tb/fir_small_15.hex")) dut (
    .clk, .rst_n, .adc_in, .xbar_enable(xen), .kx, .ky, .x_off(xo), .y_off(yo),
    .xbar_sw(xsw), .xbar_step(xstep), .adc_raw,
    .tbt_iq_valid(tiv), .tbt_i(ti), .tbt_q(tq), .tbt_amp, .tbt_pos,
    .fa_amp, .fa_pos, .sa_amp, .sa_pos,
    .quad_rotated(qrot), .fir_overrun(fovr), .div_zero(dz));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---- mechanism counters ----
  int n_step = 0, n_disable = 0, n_rot = 0, n_dz = 0, n_negx = 0, n_bias = 0, n_corr = 0;
  int n_tbt = 0, n_fa = 0, n_sa = 0;

  // ---- raw-data reordering: adc_raw one clock after the words ----
  adc_t elec_d [NCH];
  logic run = 1'b0;
  always @(posedge clk) if (rst_n) begin
    if (run) for (int k = 0; k < NCH; k++) check(adc_raw[k] == elec_d[k], "raw reorder");
    for (int k = 0; k < NCH; k++) elec_d[k] <= elec[k];
  end

  // ---- truth ----
  function automatic real true_x();
    real s = v[0] + v[1] + v[2] + v[3];
    return real'(kx) * ((v[1] + v[2]) - (v[0] + v[3])) / s;
  endfunction
  function automatic real true_y();
    real s = v[0] + v[1] + v[2] + v[3];
    return real'(ky) * ((v[0] + v[1]) - (v[2] + v[3])) / s;
  endfunction

  // Overall gains: TBT = CIC12 (12^5/2^18 * 2^7) * CORDIC K7; FA and SA CICs R^N/2^G.
  real k7, g_tbt, g_fa, g_sa;
  int  phase = 0;
  bit  settled = 1'b0;

  function automatic real ab(input real a); return a < 0 ? -a : a; endfunction

  always @(posedge clk) if (rst_n) begin
    if (xstep && xen) n_step++;
    if (xstep && !xen && xsw == 2'd0) n_disable++;
    n_rot += $countones(qrot);
    if (dz != 0) n_dz++;
    if (tbt_pos.valid) begin
      n_tbt++;
      if (settled && phase == 1) begin
        check(ab(real'(tbt_pos.x) - true_x()) < 3000.0 && ab(real'(tbt_pos.y) - true_y()) < 3000.0, "TBT position");
      end
      if (settled && phase == 2 && ab(real'(tbt_pos.x) - true_x()) > 50000.0) n_bias++;
      if (tbt_pos.x < 0) n_negx++;
    end
    if (tbt_amp.valid && settled && phase == 1) begin
      check(ab(real'(tbt_amp.b) / (v[1] * g_tbt) - 1.0) < 2.0e-3, "TBT amplitude scale");
    end
    if (fa_pos.valid) begin
      n_fa++;
      if (settled && phase == 1)
        check(ab(real'(fa_pos.x) - true_x()) < 3000.0 && ab(real'(fa_pos.y) - true_y()) < 3000.0, "FA position");
    end
    if (fa_amp.valid && settled && phase == 1)
      check(ab(real'(fa_amp.c) / (v[2] * g_tbt * g_fa) - 1.0) < 2.0e-3, "FA amplitude scale");
    if (sa_pos.valid) begin
      n_sa++;
      if (settled && phase == 1)
        check(ab(real'(sa_pos.x) - true_x()) < 3000.0 && ab(real'(sa_pos.y) - true_y()) < 3000.0, "SA position");
      if (settled && phase == 3) begin
        check(ab(real'(sa_pos.x) - true_x()) < 3000.0 && ab(real'(sa_pos.y) - true_y()) < 3000.0, "SA position with switching");
        n_corr++;
      end
    end
    if (sa_amp.valid && settled && phase == 1)
      check(ab(real'(sa_amp.d) / (v[3] * g_tbt * g_fa * g_sa) - 1.0) < 2.0e-3, "SA amplitude scale");
    if (run) check(!fovr, "no FIR overrun");
  end

  localparam int SETTLE = 60000, MEASURE = 40000;

  initial begin
    k7 = 1.0;
    for (int i = 0; i < 7; i++) k7 = k7 * $sqrt(1.0 + 2.0 ** (-2 * i));
    g_tbt = (248832.0 / 262144.0) * 128.0 * k7;
    g_fa  = 100000.0 / 131072.0;   // 10^5 / 2^17
    g_sa  = 1024.0 / 1024.0;       // 4^5 / 2^10
    v[0] = 10000.0; v[1] = 12000.0; v[2] = 14000.0; v[3] = 9000.0;
    ph[0] = 0.5; ph[1] = 2.1; ph[2] = 3.6; ph[3] = 5.2;   // radians; B and C give I < 0
    for (int k = 0; k < NCH; k++) gain[k] = 1.0;
    // longer than the model's switch-to-ADC latency, so that its delay
    // line holds only patterns from after reset
    repeat (8) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    run <= 1'b1;
    // Phase A
    phase = 1;
    repeat (SETTLE) @(posedge clk);
    settled = 1'b1;
    repeat (MEASURE) @(posedge clk);
    // Phase B: unequal gains, switching off
    settled = 1'b0; phase = 2;
    gain[0] = 1.04; gain[1] = 0.96; gain[2] = 0.97; gain[3] = 1.03;
    noise = 3;
    repeat (10000) @(posedge clk);
    settled = 1'b1;
    repeat (10000) @(posedge clk);
    // Phase C: switching on, beam moved
    settled = 1'b0; phase = 3;
    v[0] = 14000.0; v[1] = 9000.0; v[2] = 10000.0; v[3] = 13000.0;
    xen <= 1'b1;
    repeat (SETTLE) @(posedge clk);
    settled = 1'b1;
    repeat (MEASURE) @(posedge clk);
    // switching off again, from a pattern other than straight
    wait (xsw != 2'd0);
    @(posedge clk);
    xen <= 1'b0;
    repeat (10) @(posedge clk);
    check(xsw == 2'd0, "pattern straight after disable");
    $display("mechanisms: steps=%0d disables=%0d rotations=%0d zero_sum=%0d neg_x=%0d bias=%0d corrected=%0d tbt=%0d fa=%0d sa=%0d",
             n_step, n_disable, n_rot, n_dz, n_negx, n_bias, n_corr, n_tbt, n_fa, n_sa);
    check(n_step > 0, "pattern steps");
    check(n_disable > 0, "switching disabled");
    check(n_rot > 0, "quadrant rotation");
    check(n_dz > 0, "zero-sum guard");
    check(n_negx > 0, "negative position");
    check(n_bias > 0, "gain bias without switching");
    check(n_corr > 0, "SA corrected by switching");
    check(n_sa > 0 && n_fa > 0 && n_tbt > 0, "all rates produced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
