// Input-level sweep of bpm_dsp_top: the beam stays at one position while
// the signal level steps down over 50 dB, from 30 000 to 95 ADC counts
// peak, with switching off, equal channel gains and no added noise. Only
// the ADC rounding and the fixed-point arithmetic of the chain remain, so
// this measures the digital chain's own error floor against level. At
// each level, after the filters have settled: the TBT and FA positions
// must lie within 1 um + 6 mm*count / A of the true position (the rounding
// of a sample moves a ratio by about 1/A), and the TBT amplitude must be
// proportional to the level (gain 200.1 counts per count within 0.5 % +
// 2/A). FA and SA run at the reduced sizes of tb_bpm_dsp_top; the TBT
// path is full size. The worst error seen at each level is printed.
module tb_bpm_level_sweep;
  import bpm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  adc_t adc_in [NCH], adc_raw [NCH], elec [NCH];
  logic [K_W-1:0] kx = 28'd10_000_000, ky = 28'd10_000_000;
  logic [1:0] xsw; logic xstep, tiv;
  logic signed [IQ_W-1:0] ti [NCH], tq [NCH];
  amp4_t tbt_amp, fa_amp, sa_amp;
  pos_sample_t tbt_pos, fa_pos, sa_pos;
  logic [NCH-1:0] qrot;
  logic fovr;
  logic [2:0] dz;

  real v [NCH], ph [NCH], gain [NCH];
  real rel [NCH];
  int noise = 0;

  bpm_signal_model #(.LAT(4)) model (.clk, .sw_pattern(xsw), .v, .ph, .gain, .noise, .adc(adc_in), .elec);

  bpm_dsp_top #(.FA_CIC_R(10), .FA_FIR_TAPS(15), .FA_FIR_D(2), .FA_FIR_FILE("tb/fir_small_15.hex"),
                .SA_CIC_R(4), .SA_FIR_TAPS(15), .SA_FIR_D(2), .SA_FIR_FILE("tb/fir_small_15.hex")) dut (
    .clk, .rst_n, .adc_in, .xbar_enable(1'b0), .kx, .ky, .x_off('0), .y_off('0),
    .xbar_sw(xsw), .xbar_step(xstep), .adc_raw,
    .tbt_iq_valid(tiv), .tbt_i(ti), .tbt_q(tq), .tbt_amp, .tbt_pos,
    .fa_amp, .fa_pos, .sa_amp, .sa_pos,
    .quad_rotated(qrot), .fir_overrun(fovr), .div_zero(dz));

  function automatic real ab(input real a); return a < 0 ? -a : a; endfunction
  function automatic real true_x();
    return real'(kx) * ((rel[1] + rel[2]) - (rel[0] + rel[3])) / (rel[0] + rel[1] + rel[2] + rel[3]);
  endfunction
  function automatic real true_y();
    return real'(ky) * ((rel[0] + rel[1]) - (rel[2] + rel[3])) / (rel[0] + rel[1] + rel[2] + rel[3]);
  endfunction

  real level, k7, g_tbt, worst_tbt, worst_fa, worst_amp;
  bit  measuring = 1'b0;
  int  n_levels = 0, n_meas = 0;

  always @(posedge clk) if (rst_n && measuring) begin
    if (tbt_pos.valid) begin
      automatic real e = ab(real'(tbt_pos.x) - true_x()) + ab(real'(tbt_pos.y) - true_y());
      if (e > worst_tbt) worst_tbt = e;
      checks++; n_meas++;
      if (e > 1000.0 + 6.0e6 / level) begin failures++; if (failures < 10) $display("FAIL TBT level %f error %f", level, e); end
    end
    if (fa_pos.valid) begin
      automatic real e = ab(real'(fa_pos.x) - true_x()) + ab(real'(fa_pos.y) - true_y());
      if (e > worst_fa) worst_fa = e;
      checks++;
      if (e > 1000.0 + 6.0e6 / level) begin failures++; if (failures < 10) $display("FAIL FA level %f error %f", level, e); end
    end
    if (tbt_amp.valid) begin
      automatic real e = ab(real'(tbt_amp.a) / (v[0] * g_tbt) - 1.0);
      if (e > worst_amp) worst_amp = e;
      checks++;
      if (e > 5.0e-3 + 2.0 / level) begin failures++; if (failures < 10) $display("FAIL amplitude level %f rel error %f", level, e); end
    end
  end

  initial begin
    k7 = 1.0;
    for (int i = 0; i < 7; i++) k7 = k7 * $sqrt(1.0 + 2.0 ** (-2 * i));
    g_tbt = (248832.0 / 262144.0) * 128.0 * k7;
    rel[0] = 0.80; rel[1] = 1.00; rel[2] = 0.95; rel[3] = 0.70;
    ph[0] = 0.3; ph[1] = 1.9; ph[2] = 3.3; ph[3] = 4.8;
    for (int k = 0; k < NCH; k++) gain[k] = 1.0;
    level = 30000.0;
    for (int k = 0; k < NCH; k++) v[k] = rel[k] * level;
    repeat (8) @(posedge clk);
    rst_n <= 1'b1;
    // 30000 -> 95 counts in steps of 10 dB (50 dB in all)
    for (int l = 0; l < 6; l++) begin
      level = 30000.0 * (10.0 ** (-real'(l) / 2.0));
      for (int k = 0; k < NCH; k++) v[k] = rel[k] * level;
      worst_tbt = 0; worst_fa = 0; worst_amp = 0;
      repeat (12000) @(posedge clk);
      measuring = 1'b1;
      repeat (10000) @(posedge clk);
      measuring = 1'b0;
      n_levels++;
      $display("level %8.1f counts (%5.1f dBFS): worst TBT %8.1f nm, FA %8.1f nm, amplitude %.5f",
               level, 20.0 * $log10(level / 32768.0), worst_tbt, worst_fa, worst_amp);
    end
    checks++;
    if (n_levels != 6 || n_meas < 6 * 400) begin failures++; $display("FAIL sweep incomplete"); end
    checks++;
    if (fovr) begin failures++; $display("FAIL overrun"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
