// Testbench for iq_demux: feeds I, Q, -I, -Q sample sequences (the IQ
// undersampling pattern) with I and Q changing every few periods, and checks
// that every output pair is (I, Q) and that pairs come every second sample.
module tb_iq_demux;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic v = 1'b0, ov;
  logic signed [15:0] x;
  logic signed [16:0] io, qo;
  iq_demux #(.IN_W(16)) dut (.clk, .rst_n, .in_valid(v), .x, .iq_valid(ov), .i_out(io), .q_out(qo));

  int exp_i [$], exp_q [$];
  int nin = 0, last_out = -10, cyc = 0;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (ov) begin
      int ei, eq;
      ei = exp_i.pop_front(); eq = exp_q.pop_front();
      checks++;
      if (io != ei || qo != eq) begin failures++; $display("FAIL got %0d,%0d exp %0d,%0d", io, qo, ei, eq); end
      if (last_out >= 0) begin checks++; if (cyc - last_out != 2) begin failures++; $display("FAIL spacing %0d", cyc - last_out); end end
      last_out = cyc;
    end
  end

  initial begin
    x = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int blk = 0; blk < 50; blk++) begin
      int i_v, q_v;
      i_v = int'($urandom_range(65534)) - 32767;
      q_v = int'($urandom_range(65534)) - 32767;
      for (int p = 0; p < 3; p++) begin
        for (int k = 0; k < 4; k++) begin
          @(negedge clk);
          v = 1'b1;
          case (k)
            0: x = 16'(i_v);
            1: x = 16'(q_v);
            2: x = 16'(-i_v);
            3: x = 16'(-q_v);
          endcase
          if (k == 1 || k == 3) begin exp_i.push_back(i_v); exp_q.push_back(q_v); end
        end
      end
    end
    @(negedge clk) v = 1'b0;
    repeat (5) @(posedge clk);
    checks++;
    if (exp_i.size() != 0) begin failures++; $display("FAIL missing outputs"); end
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
