// Testbench for xbar_ctrl: pattern period, rotation order, alignment delay
// of the digital pattern and the disable behaviour. A short-period instance
// is checked in detail and a default instance for its 8160-clock period.
module tb_xbar_ctrl;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int unsigned P = 20, DLY = 3;
  logic [1:0] sw, dp, sw_d, dp_d;
  logic step, step_d;
  xbar_ctrl #(.PERIOD(P), .SYNC_DELAY(DLY)) dut (.clk, .rst_n, .enable(en), .sw_pattern(sw), .dig_pattern(dp), .sw_step(step));
  xbar_ctrl dut_d (.clk, .rst_n, .enable(en), .sw_pattern(sw_d), .dig_pattern(dp_d), .sw_step(step_d));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  logic [1:0] hist [$];
  int last_step = -1, cyc = 0, last_step_d = -1, nsteps_d = 0;
  logic [1:0] prev_sw = 0;

  always @(posedge clk) if (rst_n && (rst_n)) begin
    cyc++;
    hist.push_front(sw);
    if (hist.size() > DLY + 1) void'(hist.pop_back());
    if (hist.size() == DLY + 1 && en) check(dp == hist[DLY], "dig_pattern delay");
    if (step && en) begin
      if (last_step >= 0) check(cyc - last_step == P, "period");
      check(sw == prev_sw + 2'd1, "rotation order");
      last_step = cyc;
    end
    if (step_d && en) begin
      if (last_step_d >= 0) begin check(cyc - last_step_d == 8160, "default period"); nsteps_d++; end
      last_step_d = cyc;
    end
    prev_sw = sw;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    check(sw == 2'd0 && dp == 2'd0, "reset pattern");
    en <= 1'b1;
    repeat (P * 10) @(posedge clk);
    // disable: pattern must return to 0 and stay there
    en <= 1'b0;
    @(posedge clk); #1;
    check(sw == 2'd0, "disable clears pattern");
    repeat (P * 3) @(posedge clk);
    #1 check(sw == 2'd0 && dp == 2'd0, "disabled stays straight");
    last_step = -1; last_step_d = -1;
    en <= 1'b1;
    repeat (8160 * 3 + 10) @(posedge clk);
    check(nsteps_d >= 2, "default instance stepped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
