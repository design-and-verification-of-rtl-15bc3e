// tb_vedic_mult: self-checking test of the signed Vedic/Wallace multiplier.
// Checks the 16-bit default and an 18-bit instance (the width used inside
// the butterfly's complex multiplier, which exercises the odd-width padding)
// against the simulator's own multiplication: corner values and random
// operand pairs.
module tb_vedic_mult;

  logic signed [15:0] a16, b16;
  logic signed [31:0] p16;
  logic signed [17:0] a18, b18;
  logic signed [35:0] p18;

  int checks = 0, failures = 0;

  vedic_mult           dut16 (.a(a16), .b(b16), .p(p16));
  vedic_mult #(.W(18)) dut18 (.a(a18), .b(b18), .p(p18));

  task automatic check16(input logic signed [15:0] x, input logic signed [15:0] y);
    longint exp_p;
    a16 = x; b16 = y;
    #1;
    exp_p = longint'(x) * longint'(y);
    checks++;
    if (longint'(p16) != exp_p) begin
      failures++;
      if (failures < 10) $display("FAIL 16: %0d * %0d = %0d, expected %0d", x, y, p16, exp_p);
    end
  endtask

  task automatic check18(input logic signed [17:0] x, input logic signed [17:0] y);
    longint exp_p;
    a18 = x; b18 = y;
    #1;
    exp_p = longint'(x) * longint'(y);
    checks++;
    if (longint'(p18) != exp_p) begin
      failures++;
      if (failures < 10) $display("FAIL 18: %0d * %0d = %0d, expected %0d", x, y, p18, exp_p);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [15:0] c16 [8];
    logic signed [17:0] c18 [8];
    c16 = '{16'sd0, 16'sd1, -16'sd1, 16'sd32767, -16'sd32768, 16'sd255, -16'sd256, 16'sd12345};
    c18 = '{18'sd0, 18'sd1, -18'sd1, 18'sd131071, -18'sd131072, 18'sd511, -18'sd512, 18'sd77777};
    foreach (c16[i]) foreach (c16[j]) check16(c16[i], c16[j]);
    foreach (c18[i]) foreach (c18[j]) check18(c18[i], c18[j]);
    // the worked example: 3.25 * 8.6875 in Q12.4 gives 28.234375 in Q.8
    check16(16'sd52, 16'sd139);
    checks++;
    if (p16 != 32'sd7228) failures++;
    repeat (2000) begin
      check16(16'($urandom), 16'($urandom));
      check18(18'($urandom), 18'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
