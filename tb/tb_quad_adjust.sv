// Testbench for quad_adjust: random vectors in all four quadrants, plus the
// most negative code; the output must be (I, Q) when I >= 0 and (-I, -Q)
// otherwise, one clock later, with rotated set exactly in the second case.
module tb_quad_adjust;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, nrot = 0;
  logic v = 1'b0, ov, rot;
  logic signed [23:0] i_in, q_in;
  logic signed [24:0] i_o, q_o;
  quad_adjust #(.W(24)) dut (.clk, .rst_n, .in_valid(v), .i_in, .q_in, .out_valid(ov), .i_out(i_o), .q_out(q_o), .rotated(rot));
  initial begin
    i_in = 0; q_in = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 1000; n++) begin
      longint ei, eq;
      bit er;
      @(negedge clk);
      v = 1'b1;
      i_in = (n == 0) ? 24'sh800000 : 24'($urandom);
      q_in = (n == 0) ? 24'sh800000 : 24'($urandom);
      er = (i_in < 0);
      ei = er ? -longint'(i_in) : longint'(i_in);
      eq = er ? -longint'(q_in) : longint'(q_in);
      @(posedge clk); #1;
      checks++;
      if (!ov || longint'(i_o) != ei || longint'(q_o) != eq || rot != er) begin
        failures++;
        $display("FAIL in %0d,%0d out %0d,%0d rot %0d", i_in, q_in, i_o, q_o, rot);
      end
      if (rot) nrot++;
    end
    checks++; if (nrot < 300) failures++;
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
