// Testbench for cic_decim. The reference is a cascade of N moving sums of
// length R (the CIC's impulse response written directly, no integrators or
// combs), evaluated at the last sample of each block of R less the N-1 samples
// of integrator pipelining, and truncated as
// the DUT's output is. Checked: every output value, the output count and the
// latency (output two clocks after the R-th sample). Instances: the default
// (R = 12, N = 5) with one sample every clock, and R = 90, N = 5 with a
// 27-bit input fed every other clock.
module tb_cic_decim;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NS = 3000;

  // ---- default instance ----
  logic v0 = 1'b0, ov0;
  logic signed [16:0] x0;
  logic signed [23:0] y0;
  cic_decim dut0 (.clk, .rst_n, .in_valid(v0), .x(x0), .out_valid(ov0), .y(y0));

  // ---- R = 90 instance ----
  logic v1 = 1'b0, ov1;
  logic signed [26:0] x1;
  logic signed [26:0] y1;
  cic_decim #(.IN_W(27), .OUT_W(27), .R(90), .N(5)) dut1 (.clk, .rst_n, .in_valid(v1), .x(x1), .out_valid(ov1), .y(y1));

  // Reference: N cascaded length-R moving sums; returns the stage-N value
  // at every input index.
  function automatic void ref_cic(input longint xs[], input int r, input int n, output longint ys[]);
    longint cur[], nxt[];
    cur = xs;
    for (int s = 0; s < n; s++) begin
      nxt = new[cur.size()];
      for (int i = 0; i < cur.size(); i++) begin
        longint acc = 0;
        for (int j = 0; j < r; j++) if (i - j >= 0) acc += cur[i - j];
        nxt[i] = acc;
      end
      cur = nxt;
    end
    ys = cur;
  endfunction

  longint xs0[], ys0[], xs1[], ys1[];
  int t_in0[], t_in1[];
  int nout0 = 0, nout1 = 0;

  always @(posedge clk) if (rst_n && (ov0)) begin
    automatic int idx = (nout0 + 1) * 12 - 1;
    automatic int ridx = idx - 4;  // pipelined integrators: N-1 samples
    automatic longint e = (ridx < 0 ? 64'sd0 : ys0[ridx]) >>> (35 - 24);
    checks++;
    if (longint'(y0) != e) begin failures++; if (failures < 10) $display("FAIL R12 out %0d got %0d exp %0d", nout0, y0, e); end
    checks++;
    if (int'($time) - t_in0[idx] != 20) begin failures++; $display("FAIL R12 latency %0d", int'($time) - t_in0[idx]); end
    nout0++;
  end

  always @(posedge clk) if (rst_n && (ov1)) begin
    automatic int idx = (nout1 + 1) * 90 - 1;
    automatic int ridx = idx - 4;
    // 90^5 needs 33 bits of growth: register 60 bits, output top 27
    automatic longint e = ys1[ridx] >>> (60 - 27);
    checks++;
    if (longint'(y1) != e) begin failures++; if (failures < 10) $display("FAIL R90 out %0d got %0d exp %0d", nout1, y1, e); end
    nout1++;
  end

  initial begin
    xs0 = new[NS]; xs1 = new[NS * 3]; t_in0 = new[NS]; t_in1 = new[NS * 3];
    for (int i = 0; i < NS; i++) xs0[i] = longint'($signed(17'($urandom)));
    // positive amplitudes with large steps and noise
    for (int i = 0; i < NS * 3; i++) xs1[i] = ((i / 37) % 2 ? 64'sd60000000 : 64'sd5000000) + longint'($urandom_range(4000000));
    ref_cic(xs0, 12, 5, ys0);
    ref_cic(xs1, 90, 5, ys1);
    x0 = 0; x1 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    fork
      for (int i = 0; i < NS; i++) begin
        @(negedge clk); v0 = 1'b1; x0 = 17'(xs0[i]); t_in0[i] = int'($time) + 5;
      end
      for (int i = 0; i < NS * 3; i++) begin
        @(negedge clk); v1 = 1'b1; x1 = 27'(xs1[i]);
        @(negedge clk); v1 = 1'b0;
      end
    join_any
    @(negedge clk) v0 = 1'b0;
    wait (nout1 == NS * 3 / 90);
    repeat (5) @(posedge clk);
    checks++;
    if (nout0 != NS / 12) begin failures++; $display("FAIL R12 count %0d", nout0); end
    checks++;
    if (nout1 != NS * 3 / 90) begin failures++; $display("FAIL R90 count %0d", nout1); end
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
