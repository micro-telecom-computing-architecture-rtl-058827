// Testbench for cordic_mag with its default 7 cells: vectors with I >= 0 at
// random angles within +/-90 degrees and random lengths up to full scale
// are fed back to back, one per clock. Each output is compared with
// K7 * sqrt(I^2 + Q^2), K7 = prod_{i<7} sqrt(1 + 2^-2i), computed here in
// floating point; the tolerance (0.02 % + 8 LSB) covers the residual angle
// after 7 cells (below 0.9 degree, cos error 1.2e-4) and truncation. The
// latency must be 7 clocks.
module tb_cordic_mag;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic v = 1'b0, ov;
  logic signed [24:0] i_in, q_in;
  logic signed [26:0] mag;
  cordic_mag dut (.clk, .rst_n, .in_valid(v), .i_in, .q_in, .out_valid(ov), .mag);

  real exp_q [$];
  longint t_in [$];
  real k7;
  int nout = 0;

  always @(posedge clk) if (rst_n && (ov)) begin
    real e, err;
    longint t;
    e = exp_q.pop_front();
    t = t_in.pop_front();
    err = real'(mag) - e;
    if (err < 0) err = -err;
    checks++;
    if (err > e * 2.0e-4 + 8.0) begin failures++; if (failures < 10) $display("FAIL got %0d exp %f", mag, e); end
    checks++;
    if (longint'($time) - t != 70) begin failures++; if (failures < 10) $display("FAIL latency %0d", longint'($time) - t); end
    nout++;
  end

  initial begin
    k7 = 1.0;
    for (int i = 0; i < 7; i++) k7 = k7 * $sqrt(1.0 + 2.0 ** (-2 * i));
    i_in = 0; q_in = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      real ang, len, ir, qr;
      ang = (real'($urandom_range(18000)) / 100.0 - 90.0) * 3.14159265358979 / 180.0;
      len = real'($urandom_range(16777215));
      ir = len * $cos(ang); qr = len * $sin(ang);
      @(negedge clk);
      v = 1'b1;
      i_in = 25'($rtoi(ir));
      q_in = 25'($rtoi(qr));
      exp_q.push_back(k7 * $sqrt(real'(i_in) * real'(i_in) + real'(q_in) * real'(q_in)));
      t_in.push_back(longint'($time) + 5);
    end
    @(negedge clk) v = 1'b0;
    repeat (20) @(posedge clk);
    checks++; if (nout != 2000) begin failures++; $display("FAIL count %0d", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
