// Testbench for dos_position: random electrode amplitudes (including beams
// far off centre, so that both signs appear, and an all-zero set) are fed
// one per clock. Each output is compared with the difference-over-sum
// formula evaluated in floating point:
//   X = Kx ((VB+VC) - (VA+VD)) / S + Xoff,  Y = Ky ((VA+VB) - (VC+VD)) / S + Yoff
// with Kx = 10 mm and Ky = 16.381 mm in nm; the tolerance is 2 nm (ratio
// truncation plus product truncation). The latency must be 27 clocks.
module tb_dos_position;
  import bpm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, nneg = 0, nzero = 0;

  amp4_t amp;
  pos_sample_t pos;
  logic dz;
  logic [K_W-1:0] kx = 28'd10_000_000, ky = 28'd16_381_000;
  pos_t xo = -32'sd1234, yo = 32'sd777;
  dos_position dut (.clk, .rst_n, .amp, .kx, .ky, .x_off(xo), .y_off(yo), .pos, .div_zero(dz));

  real ex_q [$], ey_q [$];
  longint es_q [$], t_q [$];
  int nout = 0;

  always @(posedge clk) if (rst_n && (pos.valid)) begin
    real ex, ey, dx, dy;
    longint es, t;
    ex = ex_q.pop_front(); ey = ey_q.pop_front(); es = es_q.pop_front(); t = t_q.pop_front();
    dx = real'(pos.x) - ex; dy = real'(pos.y) - ey;
    checks++;
    if (dx > 2.0 || dx < -2.0 || dy > 2.0 || dy < -2.0 || longint'(pos.sum) != es) begin
      failures++;
      if (failures < 10) $display("FAIL got %0d,%0d exp %f,%f sum %0d/%0d", pos.x, pos.y, ex, ey, pos.sum, es);
    end
    if (es == 0) begin checks++; nzero++; if (!dz) begin failures++; $display("FAIL div_zero"); end end
    if (pos.x < xo) nneg++;
    checks++;
    if (longint'($time) - t != 270) begin failures++; if (failures < 10) $display("FAIL latency %0d", longint'($time) - t); end
    nout++;
  end

  initial begin
    amp = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 1500; n++) begin
      longint a, b, c, d, s;
      real x, y;
      int full;
      full = (n % 3 == 0) ? 67108863 : (n % 3 == 1) ? 100000 : 2000;
      a = $urandom_range(full); b = $urandom_range(full); c = $urandom_range(full); d = $urandom_range(full);
      if (n == 700) begin a = 0; b = 0; c = 0; d = 0; end
      @(negedge clk);
      amp.valid = 1'b1;
      amp.a = amp_t'(a); amp.b = amp_t'(b); amp.c = amp_t'(c); amp.d = amp_t'(d);
      s = a + b + c + d;
      if (s == 0) begin x = real'(xo); y = real'(yo); end
      else begin
        x = real'(kx) * real'((b + c) - (a + d)) / real'(s) + real'(xo);
        y = real'(ky) * real'((a + b) - (c + d)) / real'(s) + real'(yo);
      end
      ex_q.push_back(x); ey_q.push_back(y); es_q.push_back(s); t_q.push_back(longint'($time) + 5);
    end
    @(negedge clk) amp.valid = 1'b0;
    repeat (40) @(posedge clk);
    checks++; if (nout != 1500) begin failures++; $display("FAIL count %0d", nout); end
    checks++; if (nneg == 0 || nzero != 1) begin failures++; $display("FAIL coverage"); end
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
