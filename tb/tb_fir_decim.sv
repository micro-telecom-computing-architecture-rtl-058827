// Testbench for fir_decim. The reference convolves the input with the
// coefficient table (read here from the same file) sample by sample and
// keeps every D-th result, then shifts by 17 and saturates. Instances: the
// default (101 taps, D = 1, five multipliers) with an input every 24 clocks
// as at the turn-by-turn rate, and the FA filter (69 taps, D = 5, one
// multiplier) with 27-bit inputs. Checked: each output value, the output
// count, the compute latency of the default instance and that no overrun
// occurs. A near-full-scale stretch of input exercises the saturation.
module tb_fir_decim;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NS0 = 600, NS1 = 1500;

  logic v0 = 1'b0, ov0, or0;
  logic signed [23:0] x0, y0;
  fir_decim dut0 (.clk, .rst_n, .in_valid(v0), .x(x0), .out_valid(ov0), .y(y0), .overrun(or0));

  logic v1 = 1'b0, ov1, or1;
  logic signed [26:0] x1, y1;
  fir_decim #(.IN_W(27), .OUT_W(27), .TAPS(69), .D(5), .MACS(1), .COEF_FILE("rtl/fir_fa_69.hex")) dut1 (
    .clk, .rst_n, .in_valid(v1), .x(x1), .out_valid(ov1), .y(y1), .overrun(or1));

  logic [17:0] c0 [101];
  logic [17:0] c1 [69];
  longint xs0[NS0], xs1[NS1];
  int nout0 = 0, nout1 = 0, nsat = 0;
  longint t_last_in0;

  function automatic longint fir_ref(input longint xs[], input int n, input int taps, input int which, input int w);
    longint acc = 0, mx, mn, r;
    for (int j = 0; j < taps; j++) if (n - j >= 0) begin
      longint c = (which == 0) ? longint'($signed(c0[j])) : longint'($signed(c1[j]));
      acc += c * xs[n - j];
    end
    r = acc >>> 17;
    mx = (64'sd1 <<< (w - 1)) - 1; mn = -(64'sd1 <<< (w - 1));
    if (r > mx) r = mx;
    if (r < mn) r = mn;
    return r;
  endfunction

  always @(posedge clk) if (rst_n && (ov0)) begin
    automatic longint e = fir_ref(xs0, nout0, 101, 0, 24);
    checks++;
    if (longint'(y0) != e) begin failures++; if (failures < 10) $display("FAIL tbt out %0d got %0d exp %0d", nout0, y0, e); end
    if (e == 64'sd8388607 || e == -64'sd8388608) nsat++;
    // 21 multiply steps, one product register and one output register
    checks++;
    if (longint'($time) - t_last_in0 != 10 * 23) begin failures++; if (failures < 10) $display("FAIL tbt latency %0d", longint'($time) - t_last_in0); end
    nout0++;
  end

  always @(posedge clk) if (rst_n && (ov1)) begin
    automatic longint e = fir_ref(xs1, nout1 * 5 + 4, 69, 1, 27);
    checks++;
    if (longint'(y1) != e) begin failures++; if (failures < 10) $display("FAIL fa out %0d got %0d exp %0d", nout1, y1, e); end
    nout1++;
  end

  initial begin
    $readmemh("rtl/fir_tbt_101.hex", c0);
    $readmemh("rtl/fir_fa_69.hex", c1);
    for (int i = 0; i < NS0; i++) xs0[i] = (i >= 300 && i < 400) ? 64'sd8388000 + longint'($urandom_range(600))
                                          : longint'($signed(24'($urandom)));
    for (int i = 0; i < NS1; i++) xs1[i] = 64'sd30000000 + longint'($urandom_range(20000000)) * ((i / 50) % 2);
    x0 = 0; x1 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    fork
      for (int i = 0; i < NS0; i++) begin
        @(negedge clk); v0 = 1'b1; x0 = 24'(xs0[i]); t_last_in0 = longint'($time) + 5;
        @(negedge clk); v0 = 1'b0;
        repeat (22) @(negedge clk);
      end
      for (int i = 0; i < NS1; i++) begin
        @(negedge clk); v1 = 1'b1; x1 = 27'(xs1[i]);
        @(negedge clk); v1 = 1'b0;
        repeat (13) @(negedge clk);
      end
    join
    repeat (200) @(posedge clk);
    checks++; if (nout0 != NS0) begin failures++; $display("FAIL tbt count %0d", nout0); end
    checks++; if (nout1 != NS1 / 5) begin failures++; $display("FAIL fa count %0d", nout1); end
    checks++; if (or0 || or1) begin failures++; $display("FAIL overrun"); end
    checks++; if (nsat == 0) begin failures++; $display("FAIL saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
