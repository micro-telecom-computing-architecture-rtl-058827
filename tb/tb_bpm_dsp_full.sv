// Full-size testbench of bpm_dsp_top: every parameter at its default
// (switching every 8160 clocks, CIC 12 / 90 / 100, FIRs of 101, 69 and 99
// taps), run from reset until NSA slow-acquisition outputs have appeared,
// about 10.9 million clocks each; the last ones come from a full SA filter.
//
// The four channels have equal gains and the crossbar is switching; the
// beam current varies slowly by +/-20 %. The positions must match the difference-over-sum of the true amplitudes at
// every switch pattern once the filters have filled. Checks:
//   - raw data reordered word by word at every clock
//   - TBT and FA positions against the true position (3 um, Kx = 10 mm)
//   - FA amplitudes recomputed here from the DUT's own TBT amplitudes and
//     SA amplitudes from its FA amplitudes, with the CIC written as its
//     impulse response (a five-fold boxcar convolution, delayed by the four
//     samples of integrator pipelining) and the FIR as a direct convolution
//     with the coefficient table, kept every D-th; they must match exactly
//   - the SA position of the settled outputs against the true position
//   - output counts: one TBT sample per 24 clocks, FA per 450 TBT, SA per
//     1000 FA
module tb_bpm_dsp_full;
  import bpm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NSA = 11;   // the 99-tap SA filter is full from the 10th on

  adc_t adc_in [NCH], adc_raw [NCH], elec [NCH];
  logic xen = 1'b1;
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

  real v [NCH], v0 [NCH], ph [NCH], gain [NCH];
  int noise = 3;

  bpm_signal_model #(.LAT(4)) model (.clk, .sw_pattern(xsw), .v, .ph, .gain, .noise, .adc(adc_in), .elec);

  bpm_dsp_top dut (
    .clk, .rst_n, .adc_in, .xbar_enable(xen), .kx, .ky, .x_off(xo), .y_off(yo),
    .xbar_sw(xsw), .xbar_step(xstep), .adc_raw,
    .tbt_iq_valid(tiv), .tbt_i(ti), .tbt_q(tq), .tbt_amp, .tbt_pos,
    .fa_amp, .fa_pos, .sa_amp, .sa_pos,
    .quad_rotated(qrot), .fir_overrun(fovr), .div_zero(dz));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask
  function automatic real ab(input real a); return a < 0 ? -a : a; endfunction

  // ---- reference decimators ----
  longint h_fa [], h_sa [];       // CIC impulse responses
  logic [17:0] c_fa [69], c_sa [99];

  function automatic void boxcar5(input int r, output longint h []);
    longint cur [], nxt [];
    cur = new[1]; cur[0] = 1;
    for (int s = 0; s < 5; s++) begin
      nxt = new[cur.size() + r - 1];
      foreach (nxt[i]) nxt[i] = 0;
      foreach (cur[i]) for (int j = 0; j < r; j++) nxt[i + j] += cur[i];
      cur = nxt;
    end
    h = cur;
  endfunction

  longint tbt_in [NCH][$], fa_cic [NCH][$], fa_in [NCH][$], sa_cic [NCH][$];

  // CIC output ending at input index idx of channel k (which: 0 = FA, 1 = SA).
  function automatic longint cic_out(input int which, input int k, input int idx);
    longint acc = 0;
    if (which == 0) begin
      for (int j = 0; j < h_fa.size(); j++) if (idx - j >= 0) acc += h_fa[j] * tbt_in[k][idx - j];
      return acc >>> 33;   // 90^5 needs 33 bits of growth
    end
    for (int j = 0; j < h_sa.size(); j++) if (idx - j >= 0) acc += h_sa[j] * fa_in[k][idx - j];
    return acc >>> 34;     // 100^5 needs 34 bits of growth
  endfunction

  function automatic longint fir_out(input int which, input int k, input int idx);
    longint acc = 0, r, mx, mn;
    if (which == 0) begin
      for (int j = 0; j < 69; j++) if (idx - j >= 0) acc += longint'($signed(c_fa[j])) * fa_cic[k][idx - j];
    end else begin
      for (int j = 0; j < 99; j++) if (idx - j >= 0) acc += longint'($signed(c_sa[j])) * sa_cic[k][idx - j];
    end
    r = acc >>> 17;
    mx = (64'sd1 <<< (AMP_W - 1)) - 1; mn = -(64'sd1 <<< (AMP_W - 1));
    return r > mx ? mx : (r < mn ? mn : r);
  endfunction

  function automatic longint amp_of(input amp4_t a, input int k);
    case (k)
      0: return longint'(a.a);
      1: return longint'(a.b);
      2: return longint'(a.c);
      default: return longint'(a.d);
    endcase
  endfunction

  // ---- raw-data reordering ----
  adc_t elec_d [NCH];
  logic run = 1'b0;
  always @(posedge clk) if (rst_n) begin
    if (run) for (int k = 0; k < NCH; k++) check(adc_raw[k] == elec_d[k], "raw reorder");
    for (int k = 0; k < NCH; k++) elec_d[k] <= elec[k];
  end

  function automatic real true_x();
    return real'(kx) * ((v[1] + v[2]) - (v[0] + v[3])) / (v[0] + v[1] + v[2] + v[3]);
  endfunction
  function automatic real true_y();
    return real'(ky) * ((v[0] + v[1]) - (v[2] + v[3])) / (v[0] + v[1] + v[2] + v[3]);
  endfunction

  // Slow common variation of the beam current (+/-20 %, period 2^22
  // clocks): the position stays put, the amplitudes move, so the exact
  // amplitude comparisons are sensitive to sample alignment.
  int unsigned tick = 0;
  always @(posedge clk) if (rst_n) begin
    tick <= tick + 1;
    if (tick % 1024 == 0)
      for (int k = 0; k < NCH; k++) v[k] = v0[k] * (1.0 + 0.2 * $sin(6.283185307 * real'(tick) / 4194304.0));
  end

  int n_sapos = 0;
  int n_tbt = 0, n_fa = 0, n_sa = 0, n_fa_cic = 0, n_step = 0;
  longint t_last_tbt = 0;
  longint tbt_t [$];

  always @(posedge clk) if (rst_n && (sa_pos.valid && n_sa >= 10)) begin
    check(ab(real'(sa_pos.x) - true_x()) < 3000.0 && ab(real'(sa_pos.y) - true_y()) < 3000.0, "SA position");
    $display("SA position x=%0d y=%0d nm, true %f %f", sa_pos.x, sa_pos.y, true_x(), true_y());
    n_sapos++;
  end

  always @(posedge clk) if (rst_n) begin
    if (xstep) n_step++;
    if (run) check(!fovr, "no FIR overrun");
    if (tbt_amp.valid) begin
      tbt_t.push_back(longint'($time));
      for (int k = 0; k < NCH; k++) tbt_in[k].push_back(amp_of(tbt_amp, k));
      if (n_tbt > 0) check(longint'($time) - t_last_tbt == 240, "TBT rate");
      t_last_tbt = longint'($time);
      n_tbt++;
    end
    if (tbt_pos.valid && n_tbt > 400)
      check(ab(real'(tbt_pos.x) - true_x()) < 3000.0 && ab(real'(tbt_pos.y) - true_y()) < 3000.0, "TBT position");
    if (fa_amp.valid) begin
      // FA CIC outputs feeding this FIR output: 5 per FA sample
      while (n_fa_cic < (n_fa + 1) * 5) begin
        for (int k = 0; k < NCH; k++)
          fa_cic[k].push_back(cic_out(0, k, (n_fa_cic + 1) * 90 - 1 - 4));
        n_fa_cic++;
      end
      for (int k = 0; k < NCH; k++) begin
        automatic longint e = fir_out(0, k, n_fa * 5 + 4);
        check(amp_of(fa_amp, k) == e, "FA amplitude");
        fa_in[k].push_back(amp_of(fa_amp, k));
      end
      // 450 TBT samples per FA sample; the output follows the last of them
      // by 2 (CIC) + 69 (one tap per clock) + 2 (product and output) clocks
      check(longint'($time) - tbt_t[(n_fa + 1) * 450 - 1] == 10 * 73, "FA rate and latency");
      n_fa++;
    end
    if (fa_pos.valid && n_fa > 80)
      check(ab(real'(fa_pos.x) - true_x()) < 3000.0 && ab(real'(fa_pos.y) - true_y()) < 3000.0, "FA position");
    if (sa_amp.valid) begin
      for (int m = 0; m < 10; m++)
        for (int k = 0; k < NCH; k++)
          sa_cic[k].push_back(cic_out(1, k, (n_sa * 10 + m + 1) * 100 - 1 - 4));
      for (int k = 0; k < NCH; k++)
        check(amp_of(sa_amp, k) == fir_out(1, k, n_sa * 10 + 9), "SA amplitude");
      check(fa_in[0].size() == (n_sa + 1) * 1000, "SA rate");
      n_sa++;
      $display("SA output %0d at %0t: amplitudes %0d %0d %0d %0d", n_sa, $time, amp_of(sa_amp, 0), amp_of(sa_amp, 1), amp_of(sa_amp, 2), amp_of(sa_amp, 3));
    end
  end

  initial begin
    boxcar5(90, h_fa);
    boxcar5(100, h_sa);
    $readmemh("rtl/fir_fa_69.hex", c_fa);
    $readmemh("rtl/fir_sa_99.hex", c_sa);
    v0[0] = 10000.0; v0[1] = 12000.0; v0[2] = 14000.0; v0[3] = 9000.0;
    for (int k = 0; k < NCH; k++) v[k] = v0[k];
    ph[0] = 0.5; ph[1] = 2.1; ph[2] = 3.6; ph[3] = 5.2;
    for (int k = 0; k < NCH; k++) gain[k] = 1.0;
    // longer than the model's switch-to-ADC latency, so that its delay
    // line holds only patterns from after reset
    repeat (8) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    run <= 1'b1;
    wait (n_sa == NSA);
    repeat (100) @(posedge clk);
    $display("outputs: tbt=%0d fa=%0d sa=%0d pattern steps=%0d", n_tbt, n_fa, n_sa, n_step);
    check(n_step > 1000, "crossbar switching");
    check(n_fa == NSA * 1000, "FA count");
    check(n_sapos > 0, "settled SA position checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NSA * 10_880_000 + 200_000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
