// tb_complex_mult: self-checking test of the three-multiplier complex
// product. It applies the worked example of the design (Z1 = 3.25 + 3j,
// Z2 = 7.5 + 1.1875j in Q12.4, product 20.8125 + 26.359375j in Q.8) and
// random operands, compares with x1*x2 - y1*y2 and x1*y2 + y1*x2 computed
// here, and checks the one-clock latency.
module tb_complex_mult;

  logic clk = 0, rst_n = 0;
  logic signed [15:0] z1_re, z1_im, z2_re, z2_im;
  logic signed [34:0] prod_re, prod_im;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  complex_mult dut (.*);

  task automatic apply(input logic signed [15:0] x1, y1, x2, y2);
    longint er, ei;
    @(negedge clk);
    z1_re = x1; z1_im = y1; z2_re = x2; z2_im = y2;
    er = longint'(x1) * x2 - longint'(y1) * y2;
    ei = longint'(x1) * y2 + longint'(y1) * x2;
    // not yet: result appears after one rising edge
    @(negedge clk);
    checks++;
    if (longint'(prod_re) != er || longint'(prod_im) != ei) begin
      failures++;
      if (failures < 10)
        $display("FAIL (%0d,%0d)*(%0d,%0d) = (%0d,%0d), expected (%0d,%0d)",
                 x1, y1, x2, y2, prod_re, prod_im, er, ei);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    z1_re = 0; z1_im = 0; z2_re = 0; z2_im = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // worked example: 3.25 = 52/16, 3 = 48/16, 7.5 = 120/16, 1.1875 = 19/16
    apply(16'sd52, 16'sd48, 16'sd120, 16'sd19);
    checks++;
    if (prod_re != 35'sd5328 || prod_im != 35'sd6748) begin   // 20.8125*256, 26.359375*256
      failures++;
      $display("FAIL worked example: (%0d,%0d)", prod_re, prod_im);
    end
    // latency: a new input must not change the output before the edge
    @(negedge clk);
    z1_re = 16'sd1000; z1_im = 16'sd0; z2_re = 16'sd3; z2_im = 16'sd0;
    #1;
    checks++;
    if (prod_re != 35'sd5328) begin failures++; $display("FAIL latency: output changed early"); end
    @(posedge clk); #1;
    checks++;
    if (prod_re != 35'sd3000) begin failures++; $display("FAIL latency: output not updated after 1 clock"); end
    // extremes and random operands
    apply(-16'sd32768, -16'sd32768, -16'sd32768, -16'sd32768);
    apply(16'sd32767, -16'sd32768, 16'sd32767, 16'sd32767);
    repeat (2000) apply(16'($urandom), 16'($urandom), 16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
